// exp_pkg: widths, constants, the special-result encoding and the table
// generator shared by the double-precision exp() pipeline.
//
// Fixed-point conventions used across the pipeline:
//   * the converted argument x is two's complement with FW = 62 fraction
//     bits and 10 integer bits plus sign (XFIX_W = 73 bits);
//   * the reduced argument x_F = x - x_I*ln2 lies in [0, ln2) and is an
//     unsigned FW-bit fraction, cut into x_M | x_D | x_L | x_T
//     (9 + 9 + 9 + 35 bits, weights 2^-1..2^-9, 2^-10..2^-18,
//     2^-19..2^-27 and 2^-28..2^-62);
//   * multiplier outputs carry GUARD extra fraction bits (FW+GUARD in
//     total) that the following round stage removes.
// The 62-bit working precision follows the source design; the guard-bit
// count, the constant widths and the special-case encoding are this
// implementation's own choices.
package exp_pkg;

  localparam int unsigned FW     = 62;   // fraction bits of the datapath
  localparam int unsigned XINT_W = 11;   // integer bits of x incl. sign
  localparam int unsigned XFIX_W = XINT_W + FW;  // 73
  localparam int unsigned XI_W   = 11;   // x_I, two's complement
  localparam int unsigned XIE_W  = 12;   // x_I estimate before range check
  localparam int unsigned SEG_W  = 9;    // width of x_M, x_D and x_L
  localparam int unsigned XT_W   = FW - 3 * SEG_W;  // 35, width of x_T
  localparam int unsigned GUARD  = 6;    // guard bits after a multiplier

  // Widths of the table words, all scaled by 2^FW.
  localparam int unsigned M_W = FW + 2;       // e^xM in [1, e): 2.62
  localparam int unsigned D_W = FW - SEG_W;   // e^xD - 1 < 2^-9
  localparam int unsigned L_W = FW - 2*SEG_W; // e^xL - 1 < 2^-18
  localparam int unsigned P_W = FW + 2;       // products >= 1: 2.62
  localparam int unsigned S_W = FW - 16;      // e^xL*(1+xT) - 1 < 2^-17

  // ln(2) with 76 fraction bits (rounded down) and log2(e) with 24.
  localparam int unsigned LN2_FW = 76;
  localparam logic [75:0] LN2_C  = 76'hB_1721_7F7D_1CF7_9ABC9E;
  localparam int unsigned L2E_FW = 24;
  localparam logic [24:0] LOG2E_C = 25'h171_5476;

  // Latency of the whole exp() pipeline in clock cycles.
  localparam int unsigned EXP_LATENCY = 30;

  // Result forced by a special argument or by range overflow.
  typedef enum logic [1:0] {
    SP_NONE = 2'd0,   // ordinary result
    SP_INF  = 2'd1,   // +infinity (argument too large or +inf)
    SP_ZERO = 2'd2,   // +0 (argument too small or -inf)
    SP_NAN  = 2'd3    // quiet NaN
  } special_e;

  localparam logic [63:0] DBL_INF  = 64'h7FF0_0000_0000_0000;
  localparam logic [63:0] DBL_QNAN = 64'h7FF8_0000_0000_0000;

  // round((e^v - 1) * 2^FW) for v = idx * 2^-lsb_exp, 0 <= v < 1.
  // Taylor series v + v^2/2! + ... summed in 120-bit fixed point until the
  // next term vanishes; truncation error is far below 2^-100.
  function automatic logic [63:0] expm1_fix(input int unsigned idx,
                                            input int unsigned lsb_exp);
    localparam int unsigned WF = 120;
    logic [127:0] v, term, sum;
    logic [255:0] p;
    v    = 128'(idx) << (WF - lsb_exp);
    term = v;
    sum  = v;
    for (int n = 2; n < 64; n++) begin
      p    = 256'(term) * 256'(v);
      term = 128'(p >> WF) / 128'(n);
      if (term == '0) break;
      sum += term;
    end
    return 64'((sum + (128'(1) << (WF - FW - 1))) >> (WF - FW));
  endfunction

endpackage
