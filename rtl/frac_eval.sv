// frac_eval: evaluates the four factors of e^x_F (Fig. "LUT MSB, LUT MID,
// LUT LSB, Maclaurin" and the delay-alignment row below them).
//
// x_F (62-bit fraction) is cut into x_M = x_F[61:53], x_D = x_F[52:44],
// x_L = x_F[43:35] and x_T = x_F[34:0]. Since e^x_F = e^xM * e^xD * e^xL *
// e^xT, the first three factors are read from tables and the last one is
// the first-order Maclaurin term, e^xT ~ 1 + xT, exact to about 2^-55
// because xT < 2^-27. The Maclaurin factor is passed on without its
// leading 1, as t = xT, for the same reason the MID and LSB tables hold
// e^v - 1. Each path has one cycle of table read (or register) and one
// delay-alignment register, 2 cycles in total.
// Outputs, all scaled by 2^62: m = e^xM (64 bits), d = e^xD - 1 (53),
// l = e^xL - 1 (44), t = xT (35).
module frac_eval
  import exp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [FW-1:0] x_f,
  output logic [M_W-1:0]  m,
  output logic [D_W-1:0]  d,
  output logic [L_W-1:0]  l,
  output logic [XT_W-1:0] t
);
  logic [M_W-1:0]  m_rd;
  logic [D_W-1:0]  d_rd;
  logic [L_W-1:0]  l_rd;
  logic [XT_W-1:0] t_rd;

  exp_lut #(.IDX_W(SEG_W), .LSB_EXP(SEG_W),   .OUT_W(M_W), .ADD_ONE(1'b1))
    u_lut_msb (.clk, .a(x_f[FW-1 -: SEG_W]),           .q(m_rd));
  exp_lut #(.IDX_W(SEG_W), .LSB_EXP(2*SEG_W), .OUT_W(D_W), .ADD_ONE(1'b0))
    u_lut_mid (.clk, .a(x_f[FW-1-SEG_W -: SEG_W]),     .q(d_rd));
  exp_lut #(.IDX_W(SEG_W), .LSB_EXP(3*SEG_W), .OUT_W(L_W), .ADD_ONE(1'b0))
    u_lut_lsb (.clk, .a(x_f[FW-1-2*SEG_W -: SEG_W]),   .q(l_rd));

  // Maclaurin: e^xT - 1 ~ xT, one register to match the table reads.
  always_ff @(posedge clk) t_rd <= x_f[XT_W-1:0];

  delay_line #(.W(M_W),  .N(1)) u_al_m (.clk, .rst_n, .d(m_rd), .q(m));
  delay_line #(.W(D_W),  .N(1)) u_al_d (.clk, .rst_n, .d(d_rd), .q(d));
  delay_line #(.W(L_W),  .N(1)) u_al_l (.clk, .rst_n, .d(l_rd), .q(l));
  delay_line #(.W(XT_W), .N(1)) u_al_t (.clk, .rst_n, .d(t_rd), .q(t));
endmodule
