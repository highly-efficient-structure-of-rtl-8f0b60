// int_frac_sep: separates the argument into the integer part x_I and the
// fractional part x_F = x - x_I*ln2, with 0 <= x_F < ln2 always, so the
// sign of a negative argument migrates entirely into x_I.
//
// x_I*ln2 is computed exactly enough (ln2 with 76 fraction bits) and
// subtracted from x. Because the incoming estimate of x_I may be one too
// small or one too large, one correction step follows: x_F < 0 adds ln2 and
// decrements x_I, x_F >= ln2 subtracts ln2 and increments x_I. x_I is then
// checked against its 11-bit range: above 1023 the result is +inf, below
// -1024 it is +0 (both signalled through `special`).
// Five pipeline stages: operand register, x_I*ln2 product, subtraction,
// correction, range check and output register. The split of the work over
// the five cycles is this implementation's choice.
// Ports: x_fix, xi_est, special_in (aligned) in; x_i, x_f (62-bit
// fraction), special_out and corr (a correction step was taken) out
// 5 cycles later.
module int_frac_sep
  import exp_pkg::*;
(
  input  logic                     clk,
  input  logic signed [XFIX_W-1:0] x_fix,
  input  logic signed [XIE_W-1:0]  xi_est,
  input  special_e                 special_in,
  output logic signed [XI_W-1:0]   x_i,
  output logic [FW-1:0]            x_f,
  output special_e                 special_out,
  output logic                     corr
);
  localparam int unsigned EXT    = LN2_FW - FW;          // 14
  localparam int unsigned PROD_W = XIE_W + LN2_FW + 1;   // 89
  localparam int unsigned DIFF_W = PROD_W + 1;           // 90

  localparam logic signed [DIFF_W-1:0] LN2_S = DIFF_W'(LN2_C);

  logic signed [XFIX_W-1:0] s1_x, s2_x;
  logic signed [XIE_W-1:0]  s1_xi, s2_xi, s3_xi, s4_xi;
  special_e                 s1_sp, s2_sp, s3_sp, s4_sp;
  logic signed [PROD_W-1:0] s2_prod;
  logic signed [DIFF_W-1:0] s3_diff, s4_diff;
  logic                     s4_corr;

  always_ff @(posedge clk) begin
    // 1: operands
    s1_x  <= x_fix;
    s1_xi <= xi_est;
    s1_sp <= special_in;
    // 2: x_I * ln2
    s2_x    <= s1_x;
    s2_xi   <= s1_xi;
    s2_sp   <= s1_sp;
    s2_prod <= s1_xi * $signed({1'b0, LN2_C});
    // 3: x - x_I*ln2 at 76 fraction bits
    s3_xi   <= s2_xi;
    s3_sp   <= s2_sp;
    s3_diff <= (DIFF_W'(s2_x) <<< EXT) - DIFF_W'(s2_prod);
    // 4: one correction step into [0, ln2)
    s4_sp <= s3_sp;
    if (s3_diff < 0) begin
      s4_diff <= s3_diff + LN2_S;
      s4_xi   <= s3_xi - 1'b1;
      s4_corr <= 1'b1;
    end else if (s3_diff >= LN2_S) begin
      s4_diff <= s3_diff - LN2_S;
      s4_xi   <= s3_xi + 1'b1;
      s4_corr <= 1'b1;
    end else begin
      s4_diff <= s3_diff;
      s4_xi   <= s3_xi;
      s4_corr <= 1'b0;
    end
    // 5: range of x_I, outputs
    x_f  <= s4_diff[LN2_FW-1:EXT];
    x_i  <= XI_W'(s4_xi);
    corr <= s4_corr;
    if (s4_sp != SP_NONE)
      special_out <= s4_sp;
    else if (s4_xi > XIE_W'(1023))
      special_out <= SP_INF;
    else if (s4_xi < -XIE_W'(1024))
      special_out <= SP_ZERO;
    else
      special_out <= SP_NONE;
  end
endmodule
