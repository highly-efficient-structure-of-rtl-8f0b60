// exp_unit: one fully pipelined double-precision exp() unit, 30 cycles
// from argument to result, one argument accepted every clock.
//
// The argument x is converted to fixed point and split as
//   e^x = 2^x_I * e^x_F,   x_I = floor(x*log2 e),   x_F = x - x_I*ln2,
// with 0 <= x_F < ln2. 2^x_I becomes the result's exponent; e^x_F is the
// product of three table values and a first-order Maclaurin term for the
// four slices of x_F (see frac_eval), multiplied together in two branches
// (msb_combine and lsb_combine) that meet in final_combine.
//
// Stage timing (cycle at which each result appears):
//   fp_to_fixed 5 | mul_log2e 7 (x delayed 2 alongside) | int_frac_sep 12
//   | frac_eval 14 | msb_combine 21, lsb_combine 20 + 1 delay = 21
//   | final_combine 29 (x_I delayed 17 alongside) | exp_normalize 30.
// The stage latencies are those of the source design's block diagram.
// in_valid travels with the data through a 30-cycle delay line; there is no
// back-pressure. Two assertions check the range invariants of x_F and R.
// sep_corr and norm_shift are internal observation points
// (an x_I correction was taken, normalization shifted R) that
// testbenches read; nothing in the datapath uses them.
// Ports: in_valid, x (double) in; out_valid, y = exp(x) (double) out,
// EXP_LATENCY = 30 cycles later.
module exp_unit
  import exp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [63:0] x,
  output logic        out_valid,
  output logic [63:0] y
);
  logic signed [XFIX_W-1:0] x_fix, x_fix_d;
  special_e                 sp_cv, sp_cv_d, sp_sep, sp_fin;
  logic signed [XIE_W-1:0]  xi_est;
  logic signed [XI_W-1:0]   x_i, x_i_fin;
  logic [FW-1:0]            x_f;
  logic                     sep_corr, norm_shift;
  logic [M_W-1:0]           m;
  logic [D_W-1:0]           d;
  logic [L_W-1:0]           l;
  logic [XT_W-1:0]          t;
  logic [P_W-1:0]           p1, r;
  logic [S_W-1:0]           s, s_d;

  fp_to_fixed u_cvt (.clk, .x, .x_fix, .special(sp_cv));

  mul_log2e u_log2e (.clk, .x_fix, .xi_est);
  // delay alignment of x and its class next to the constant multiplier
  delay_line #(.W(XFIX_W + 2), .N(2)) u_dly_x (
    .clk, .rst_n, .d({x_fix, sp_cv}), .q({x_fix_d, sp_cv_d})
  );

  int_frac_sep u_sep (
    .clk, .x_fix(x_fix_d), .xi_est, .special_in(sp_cv_d),
    .x_i, .x_f, .special_out(sp_sep), .corr(sep_corr)
  );

  frac_eval u_feval (.clk, .rst_n, .x_f, .m, .d, .l, .t);

  msb_combine u_msb (.clk, .rst_n, .m, .d, .p1);
  lsb_combine u_lsb (.clk, .rst_n, .l, .t, .s);
  delay_line #(.W(S_W), .N(1)) u_dly_s (.clk, .rst_n, .d(s), .q(s_d));

  final_combine u_fin (.clk, .rst_n, .p1, .s(s_d), .r);

  // x_I and the special class wait 17 cycles for the mantissa
  delay_line #(.W(XI_W + 2), .N(17)) u_dly_xi (
    .clk, .rst_n, .d({x_i, sp_sep}), .q({x_i_fin, sp_fin})
  );

  exp_normalize u_norm (
    .clk, .r, .x_i(x_i_fin), .special(sp_fin), .y, .shifted(norm_shift)
  );

  // valid, tapped where the separation (cycle 12) and the normalization
  // input (cycle 29) hold the same argument's values
  logic v_sep, v_norm;
  delay_line #(.W(1), .N(12)) u_dly_v0 (.clk, .rst_n, .d(in_valid), .q(v_sep));
  delay_line #(.W(1), .N(17)) u_dly_v1 (.clk, .rst_n, .d(v_sep),    .q(v_norm));
  delay_line #(.W(1), .N(EXP_LATENCY - 29)) u_dly_v2 (
    .clk, .rst_n, .d(v_norm), .q(out_valid)
  );

  // x_F always lies in [0, ln2)
  a_xf_range: assert property (@(posedge clk) disable iff (!rst_n)
    v_sep |-> x_f <= FW'(LN2_C >> (LN2_FW - FW)));
  // R = e^x_F lies in [1, 2], up to a few units of rounding above 2
  a_r_range: assert property (@(posedge clk) disable iff (!rst_n)
    v_norm && sp_fin == SP_NONE |-> r >= P_W'(64'd1 << FW) && r <= P_W'((64'd2 << FW) + 64'd64));
endmodule
