// tb_msb_combine: P1 = m + m*d rounded at 2^-62, checked against the exact
// product from wide arithmetic (at most one unit of 2^-62 apart) with the
// 7-cycle latency, for random m in [1, 2) and d < 2^53, including the
// extreme operands.
`timescale 1ns/1ps
module tb_msb_combine;
  import exp_pkg::*;
  localparam int LAT = 7;
  logic clk = 0, rst_n = 0;
  logic [M_W-1:0] m = '0;
  logic [D_W-1:0] d = '0;
  logic [P_W-1:0] p1;
  msb_combine dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [P_W-1:0] q [$];

  initial begin
    int n = 3000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < n + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        logic [P_W-1:0] w;
        w = q.pop_front();
        checks++;
        if ((p1 > w ? p1 - w : w - p1) > 1) begin
          failures++;
          if (failures < 10) $display("got %h want %h", p1, w);
        end
      end
      if (i < n) begin
        logic [127:0] ex;
        m = (i == 0) ? {2'b01, {62{1'b1}}} : {2'b01, 62'({$urandom(), $urandom()})};
        d = (i == 0) ? '1 : D_W'({$urandom(), $urandom()});
        ex = 128'(m) * 128'(d);
        q.push_back(m + P_W'((ex + (128'd1 << (FW - 1))) >> FW));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
