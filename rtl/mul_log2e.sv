// mul_log2e: multiplication by the constant 1/ln(2) = log2(e) that yields
// an estimate of the integer part x_I = floor(x * log2(e)).
//
// As in the source design this product is deliberately inaccurate: only x
// rounded down to 2^-16 (27 bits) is multiplied by log2(e) rounded down to
// 24 fraction bits. For |x| < 1024 the estimate is off from the true floor
// by at most one, which the following separation stage corrects. The
// operand widths are this implementation's choice.
// Two pipeline stages (operand register, product and floor register).
// Ports: x_fix (signed, 62 fraction bits) in; xi_est (12-bit two's
// complement) out 2 cycles later.
module mul_log2e
  import exp_pkg::*;
(
  input  logic                     clk,
  input  logic signed [XFIX_W-1:0] x_fix,
  output logic signed [XIE_W-1:0]  xi_est
);
  localparam int unsigned XF_KEEP = 16;                  // fraction bits used
  localparam int unsigned XTR_W    = XINT_W + XF_KEEP;    // 27
  localparam int unsigned PROD_W  = XTR_W + 26;

  logic signed [XTR_W-1:0]   xt_q;
  logic signed [PROD_W-1:0] prod;

  always_ff @(posedge clk) xt_q <= x_fix[XFIX_W-1 -: XTR_W];

  assign prod = xt_q * $signed({1'b0, LOG2E_C});

  // Arithmetic shift = floor; |x*log2e| < 1478 fits 12 bits.
  always_ff @(posedge clk) xi_est <= XIE_W'(prod >>> (XF_KEEP + L2E_FW));
endmodule
