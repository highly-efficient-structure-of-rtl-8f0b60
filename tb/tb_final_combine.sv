// tb_final_combine: R = p1 + p1*s (p1*s rounded at 2^-62), checked against
// exact wide arithmetic (at most one unit of 2^-62 apart) with the 8-cycle
// latency, for random p1 in [1, 2) and s < 2^45 including the extremes.
`timescale 1ns/1ps
module tb_final_combine;
  import exp_pkg::*;
  localparam int LAT = 8;
  logic clk = 0, rst_n = 0;
  logic [P_W-1:0] p1 = '0;
  logic [S_W-1:0] s = '0;
  logic [P_W-1:0] r;
  final_combine dut (.*);
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
        if ((r > w ? r - w : w - r) > 1) begin
          failures++;
          if (failures < 10) $display("got %h want %h", r, w);
        end
      end
      if (i < n) begin
        logic [127:0] ex;
        p1 = (i == 0) ? {2'b01, {62{1'b1}}} : {2'b01, 62'({$urandom(), $urandom()})};
        s  = (i == 0) ? S_W'({45{1'b1}}) : S_W'(45'({$urandom(), $urandom()}));
        ex = 128'(p1) * 128'(s);
        q.push_back(p1 + P_W'((ex + (128'd1 << (FW - 1))) >> FW));
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
