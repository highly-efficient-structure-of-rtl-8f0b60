// final_combine: forms R = P1 * (1 + S) = P1 + P1*S, the mantissa of
// e^x_F before normalization.
//
// P1*S (64 x 46 bits) goes through a 6-cycle reduced-width multiplier
// while P1 waits in a 6-cycle delay line. "Round and add" takes two
// cycles: the first rounds P1*S to 62 fraction bits, the second adds it
// to P1.
// Latency 8 cycles. Ports (scaled by 2^62): p1 (64 bits, 2.62), s (46) in;
// r (64 bits, 2.62, 1 <= r < 2 up to rounding) out.
module final_combine
  import exp_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic [P_W-1:0] p1,
  input  logic [S_W-1:0] s,
  output logic [P_W-1:0] r
);
  localparam int unsigned TRUNC = 2*FW - (FW + GUARD);   // 56
  localparam int unsigned PS_W  = P_W + S_W - TRUNC;     // 54

  logic [PS_W-1:0]       ps;
  logic [PS_W-GUARD:0]   ps_r;
  logic [P_W-1:0]        p1_d, p1_dd;

  trunc_mult #(.AW(P_W), .BW(S_W), .TRUNC(TRUNC), .LATENCY(6))
    u_mul (.clk, .a(p1), .b(s), .p(ps));
  delay_line #(.W(P_W), .N(6)) u_dly (.clk, .rst_n, .d(p1), .q(p1_d));

  // round and add, cycle 1: round half up at 2^-62
  always_ff @(posedge clk) begin
    ps_r  <= (PS_W-GUARD+1)'(((PS_W+1)'(ps) + (PS_W+1)'(1 << (GUARD - 1))) >> GUARD);
    p1_dd <= p1_d;
  end
  // cycle 2: add
  always_ff @(posedge clk) r <= p1_dd + P_W'(ps_r);
endmodule
