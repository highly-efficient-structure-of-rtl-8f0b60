// delay_line: fixed-length register pipeline that keeps parallel paths of
// the exp() datapath in step (the grey "Delay" boxes of the block diagram).
//
// d is presented at q exactly N clock cycles later; N = 0 is a plain wire.
// All stages clear to zero on the synchronous active-low reset, so a valid
// flag carried through a delay_line comes out of reset deasserted.
// Ports: clk, rst_n, d[W-1:0] -> q[W-1:0].
module delay_line #(
  parameter int unsigned W = 1,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [N];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < N; i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < N; i++) stage[i] <= stage[i-1];
      end
    end
    assign q = stage[N-1];
  end
endmodule
