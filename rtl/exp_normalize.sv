// exp_normalize: turns R = e^x_F (2.62 fixed point) and the integer part
// x_I into the IEEE-754 double 2^x_I * R.
//
// If rounding errors carried R to 2 or above, R is shifted right by one
// and the exponent incremented. The 62 fraction bits are rounded to 52
// (round half up; a carry out of the fraction bumps the exponent again).
// The biased exponent x_I + 1023 + adjustments then selects the result:
// 2047 or more gives +inf, 0 or less gives +0 (subnormal results are
// flushed to zero), otherwise a normal double with sign 0. A `special`
// code from an earlier stage overrides all this (+inf, +0 or quiet NaN).
// Flushing subnormals and round-half-up are this implementation's choices.
// Latency 1 cycle. Ports: r, x_i, special in; y (double) and shifted (the
// right shift by one was used, for observation) out.
module exp_normalize
  import exp_pkg::*;
(
  input  logic                   clk,
  input  logic [P_W-1:0]         r,
  input  logic signed [XI_W-1:0] x_i,
  input  special_e               special,
  output logic [63:0]            y,
  output logic                   shifted
);
  logic [FW-1:0]       frac;
  logic [52:0]         mant_r;     // rounded fraction with carry bit
  logic                sh;
  logic signed [13:0]  bexp;
  logic [63:0]         y_c;

  always_comb begin
    sh     = r[P_W-1];
    frac   = sh ? r[P_W-2:1] : r[FW-1:0];
    mant_r = {1'b0, frac[FW-1 -: 52]} + 53'(frac[FW-53]);
    bexp   = 14'(x_i) + 14'sd1023 + 14'(sh) + 14'(mant_r[52]);
    unique case (special)
      SP_NAN:  y_c = DBL_QNAN;
      SP_INF:  y_c = DBL_INF;
      SP_ZERO: y_c = '0;
      default: begin
        if (bexp >= 14'sd2047)   y_c = DBL_INF;
        else if (bexp <= 14'sd0) y_c = '0;
        else                     y_c = {1'b0, bexp[10:0], mant_r[51:0]};
      end
    endcase
  end

  always_ff @(posedge clk) begin
    y       <= y_c;
    shifted <= sh;
  end
endmodule
