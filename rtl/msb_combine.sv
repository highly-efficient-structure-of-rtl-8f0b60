// msb_combine: forms P1 = e^xM * e^xD from the two upper table words.
//
// With d = e^xD - 1 the product is m + m*d, so the multiplier only needs
// the 53 significant bits of d instead of a full 64-bit operand. m*d is
// computed by a 6-cycle reduced-width multiplier with GUARD guard bits,
// m waits in a 6-cycle delay line, and one "add and round" cycle rounds
// m*d to 62 fraction bits and adds m.
// Latency 7 cycles. Ports (all scaled by 2^62): m (64 bits, 2.62), d (53)
// in; p1 = e^(xM+xD) (64 bits, 2.62) out.
module msb_combine
  import exp_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic [M_W-1:0] m,
  input  logic [D_W-1:0] d,
  output logic [P_W-1:0] p1
);
  localparam int unsigned TRUNC = 2*FW - (FW + GUARD);   // 56
  localparam int unsigned MD_W  = M_W + D_W - TRUNC;     // 61

  logic [MD_W-1:0] md;
  logic [M_W-1:0]  m_d;

  trunc_mult #(.AW(M_W), .BW(D_W), .TRUNC(TRUNC), .LATENCY(6))
    u_mul (.clk, .a(m), .b(d), .p(md));
  delay_line #(.W(M_W), .N(6)) u_dly (.clk, .rst_n, .d(m), .q(m_d));

  // add and round: round half up at 2^-62
  always_ff @(posedge clk)
    p1 <= m_d + ((P_W'(md) + P_W'(1 << (GUARD - 1))) >> GUARD);
endmodule
