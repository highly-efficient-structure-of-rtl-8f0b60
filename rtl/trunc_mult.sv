// trunc_mult: pipelined unsigned multiplier that produces only the upper
// AW+BW-TRUNC bits of the product a*b ("reduced-width multiplier").
//
// The operands are cut into TILE-bit pieces, the size of an FPGA DSP
// multiplier. A partial product a_i*b_j lands at bit (i+j)*TILE; tiles that
// lie wholly below bit TRUNC are not built at all and the others are cut
// at bit TRUNC before they are summed. The result p is therefore floor(a*b
// / 2^TRUNC) minus at most one unit per tile: the caller keeps guard bits
// below the precision it needs and rounds them off afterwards.
// Latency LATENCY >= 3 cycles: operand register, tile products, sum; the
// remaining LATENCY-3 registers follow the sum (a synthesis tool may
// retime them into the adder tree).
// Ports: a[AW-1:0], b[BW-1:0] in; p[AW+BW-TRUNC-1:0] out.
module trunc_mult #(
  parameter int unsigned AW      = 64,
  parameter int unsigned BW      = 53,
  parameter int unsigned TRUNC   = 56,
  parameter int unsigned TILE    = 17,
  parameter int unsigned LATENCY = 6
) (
  input  logic                   clk,
  input  logic [AW-1:0]          a,
  input  logic [BW-1:0]          b,
  output logic [AW+BW-TRUNC-1:0] p
);
  localparam int unsigned PW = AW + BW - TRUNC;
  localparam int unsigned NA = (AW + TILE - 1) / TILE;
  localparam int unsigned NB = (BW + TILE - 1) / TILE;
  localparam int unsigned FULL_W = (NA + NB) * TILE;

  logic [NA*TILE-1:0] a_q;
  logic [NB*TILE-1:0] b_q;
  logic [2*TILE-1:0]  pp [NA][NB];
  logic [PW-1:0]      sum_c, sum_q;

  always_ff @(posedge clk) begin
    a_q <= (NA*TILE)'(a);
    b_q <= (NB*TILE)'(b);
  end

  for (genvar i = 0; i < NA; i++) begin : g_a
    for (genvar j = 0; j < NB; j++) begin : g_b
      if ((i + j + 2) * TILE > TRUNC) begin : g_keep
        always_ff @(posedge clk)
          pp[i][j] <= a_q[i*TILE +: TILE] * b_q[j*TILE +: TILE];
      end else begin : g_drop
        assign pp[i][j] = '0;
      end
    end
  end

  always_comb begin
    sum_c = '0;
    for (int i = 0; i < NA; i++)
      for (int j = 0; j < NB; j++)
        sum_c += PW'((FULL_W'(pp[i][j]) << ((i + j) * TILE)) >> TRUNC);
  end

  always_ff @(posedge clk) sum_q <= sum_c;

  delay_line #(.W(PW), .N(LATENCY - 3)) u_tail (
    .clk, .rst_n(1'b1), .d(sum_q), .q(p)
  );
endmodule
