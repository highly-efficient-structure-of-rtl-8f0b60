// lsb_combine: forms S = e^xL * e^xT - 1 from the LSB table word and the
// Maclaurin term, without ever representing the leading 1.
//
// With l = e^xL - 1 and t = xT ~ e^xT - 1, (1+l)(1+t) - 1 = l + t + l*t.
// l*t (44 x 35 bits) goes through a 4-cycle reduced-width multiplier and a
// 1-cycle rounding to 62 fraction bits; l and t wait 5 cycles in delay
// lines; one "align and add" cycle sums the three terms.
// Latency 6 cycles. Ports (all scaled by 2^62): l (44 bits), t (35) in;
// s (46 bits, s < 2^-17) out.
module lsb_combine
  import exp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [L_W-1:0]  l,
  input  logic [XT_W-1:0] t,
  output logic [S_W-1:0]  s
);
  localparam int unsigned TRUNC = 2*FW - (FW + GUARD);   // 56
  localparam int unsigned LT_W  = L_W + XT_W - TRUNC;    // 23

  logic [LT_W-1:0]       lt;
  logic [LT_W-GUARD:0]   lt_r;
  logic [L_W-1:0]        l_d;
  logic [XT_W-1:0]       t_d;

  trunc_mult #(.AW(L_W), .BW(XT_W), .TRUNC(TRUNC), .LATENCY(4))
    u_mul (.clk, .a(l), .b(t), .p(lt));
  delay_line #(.W(L_W),  .N(5)) u_dly_l (.clk, .rst_n, .d(l), .q(l_d));
  delay_line #(.W(XT_W), .N(5)) u_dly_t (.clk, .rst_n, .d(t), .q(t_d));

  // round: half up at 2^-62
  always_ff @(posedge clk)
    lt_r <= (LT_W-GUARD+1)'(((LT_W+1)'(lt) + (LT_W+1)'(1 << (GUARD - 1))) >> GUARD);

  // align and add
  always_ff @(posedge clk)
    s <= S_W'(l_d) + S_W'(t_d) + S_W'(lt_r);
endmodule
