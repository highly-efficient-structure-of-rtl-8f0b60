// fp_to_fixed: converts an IEEE-754 double argument into the signed fixed-
// point format of the exp() pipeline (10 integer bits, sign, 62 fraction
// bits) and classifies arguments whose result is fixed in advance.
//
// Five pipeline stages, as in the source design's budget for this step:
//   1. capture the fields and classify NaN, +-inf and |x| >= 1024;
//   2. work out the shift of the 53-bit significand (left by e-1013 or
//      right by 1013-e, e being the biased exponent);
//   3. shift the significand to its fixed-point position;
//   4. apply the sign (two's complement);
//   5. output register.
// Bits of weight below 2^-62 are dropped (the magnitude is truncated): the
// source design neglects arguments smaller than 2^-60. Subnormal arguments
// therefore become 0. The classification (|x| >= 1024 gives +inf or +0,
// -inf gives +0, NaN gives a quiet NaN) is this implementation's choice.
// Ports: x (double) in; x_fix (signed, value = x_fix * 2^-62) and special
// out, 5 cycles later. No handshake: one argument per clock.
module fp_to_fixed
  import exp_pkg::*;
(
  input  logic                     clk,
  input  logic [63:0]              x,
  output logic signed [XFIX_W-1:0] x_fix,
  output special_e                 special
);
  // Biased exponent that puts the significand's LSB at weight 2^-62.
  localparam int unsigned E_ALIGN = 1023 + 52 - FW;  // 1013
  localparam int unsigned MAG_W   = XFIX_W - 1;      // 72

  // stage 1
  logic        s1_sign;
  logic [10:0] s1_exp;
  logic [52:0] s1_mant;
  special_e    s1_sp;
  // stage 2
  logic        s2_sign, s2_left;
  logic [6:0]  s2_amt;
  logic [52:0] s2_mant;
  special_e    s2_sp;
  // stage 3
  logic             s3_sign;
  logic [MAG_W-1:0] s3_mag;
  special_e         s3_sp;
  // stage 4
  logic signed [XFIX_W-1:0] s4_fix;
  special_e                 s4_sp;

  always_ff @(posedge clk) begin
    // 1: fields and classification
    s1_sign <= x[63];
    s1_exp  <= x[62:52];
    s1_mant <= {(x[62:52] != 11'd0), x[51:0]};
    if (x[62:52] == 11'h7FF)
      s1_sp <= (x[51:0] != '0) ? SP_NAN : (x[63] ? SP_ZERO : SP_INF);
    else if (x[62:52] >= 11'(1023 + 10))
      s1_sp <= x[63] ? SP_ZERO : SP_INF;
    else
      s1_sp <= SP_NONE;

    // 2: shift direction and amount (right shifts of 53 or more clear all)
    s2_sign <= s1_sign;
    s2_mant <= s1_mant;
    s2_sp   <= s1_sp;
    if (s1_exp >= 11'(E_ALIGN)) begin
      s2_left <= 1'b1;
      s2_amt  <= 7'(s1_exp - 11'(E_ALIGN));
    end else begin
      s2_left <= 1'b0;
      s2_amt  <= (11'(E_ALIGN) - s1_exp > 11'd64) ? 7'd64
                                                   : 7'(11'(E_ALIGN) - s1_exp);
    end

    // 3: align (special arguments give 0 so the datapath stays in range)
    s3_sign <= s2_sign;
    s3_sp   <= s2_sp;
    if (s2_sp != SP_NONE)
      s3_mag <= '0;
    else if (s2_left)
      s3_mag <= MAG_W'(s2_mant) << s2_amt;
    else
      s3_mag <= MAG_W'(s2_mant >> s2_amt);

    // 4: sign
    s4_sp  <= s3_sp;
    s4_fix <= s3_sign ? -$signed({1'b0, s3_mag}) : $signed({1'b0, s3_mag});

    // 5: output register
    x_fix   <= s4_fix;
    special <= s4_sp;
  end
endmodule
