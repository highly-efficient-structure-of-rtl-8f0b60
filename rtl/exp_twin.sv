// exp_twin: two exp() units side by side, the configuration used on an
// FPGA board whose memory delivers one 128-bit word per clock.
//
// Each 128-bit input word holds two doubles; the low half (bits 63:0) goes
// to unit 0 and the high half to unit 1. The two results are concatenated
// in the same order into a 128-bit output word, so the pair streams at two
// exp() results per clock with the 30-cycle latency of one unit. Which
// half is which lane is this implementation's choice. The sign bit of each
// result (bits 63 and 127) is always 0, since exp() is never negative.
// Ports: in_valid, in_data[127:0] in; out_valid, out_data[127:0] out.
module exp_twin
  import exp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [127:0] in_data,
  output logic         out_valid,
  output logic [127:0] out_data
);
  logic [1:0] lane_valid;

  for (genvar k = 0; k < 2; k++) begin : g_lane
    exp_unit u_exp (
      .clk, .rst_n, .in_valid,
      .x(in_data[64*k +: 64]),
      .out_valid(lane_valid[k]),
      .y(out_data[64*k +: 64])
    );
  end

  assign out_valid = lane_valid[0];

  // Both lanes see the same valid and have the same latency.
  a_lanes_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                                    lane_valid[0] == lane_valid[1]);
endmodule
