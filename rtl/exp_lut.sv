// exp_lut: one of the three block-RAM tables of the exp() pipeline.
//
// Address a (IDX_W bits) is one slice of the reduced argument, worth
// v = a * 2^-LSB_EXP. The word read is round((e^v - 1) * 2^62), plus 2^62
// when ADD_ONE is set, in OUT_W bits:
//   LUT MSB: LSB_EXP = 9,  ADD_ONE = 1, e^xM in 2.62 format (64 bits);
//   LUT MID: LSB_EXP = 18, ADD_ONE = 0, e^xD - 1 < 2^-9  (53 bits);
//   LUT LSB: LSB_EXP = 27, ADD_ONE = 0, e^xL - 1 < 2^-18 (44 bits).
// Storing e^v - 1 for the two lower slices keeps the leading zeros out of
// the words and the multipliers that use them. The contents are computed
// at start-up with the Taylor series of e^v - 1 in 120-bit fixed point
// (exp_pkg::expm1_fix); a synthesis tool evaluates the same loop to fill
// the RAM. The words carry 10 guard bits beyond the 52 of a double.
// Read latency: one clock (registered address-to-data, as a block RAM).
module exp_lut
  import exp_pkg::*;
#(
  parameter int unsigned IDX_W   = 9,
  parameter int unsigned LSB_EXP = 9,
  parameter int unsigned OUT_W   = 64,
  parameter bit          ADD_ONE = 1'b1
) (
  input  logic             clk,
  input  logic [IDX_W-1:0] a,
  output logic [OUT_W-1:0] q
);
  localparam int unsigned DEPTH = 1 << IDX_W;

  logic [OUT_W-1:0] rom [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++)
      rom[i] = OUT_W'(expm1_fix(i, LSB_EXP) + (ADD_ONE ? (64'd1 << FW) : 64'd0));
  end

  always_ff @(posedge clk) q <= rom[a];
endmodule
