// tb_lsb_combine: S = l + t + l*t (l*t rounded at 2^-62), checked against
// exact wide arithmetic (at most one unit of 2^-62 apart) with the 6-cycle
// latency, for random l < 2^44 and t < 2^35 including all-ones operands.
`timescale 1ns/1ps
module tb_lsb_combine;
  import exp_pkg::*;
  localparam int LAT = 6;
  logic clk = 0, rst_n = 0;
  logic [L_W-1:0] l = '0;
  logic [XT_W-1:0] t = '0;
  logic [S_W-1:0] s;
  lsb_combine dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [S_W-1:0] q [$];

  initial begin
    int n = 3000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < n + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        logic [S_W-1:0] w;
        w = q.pop_front();
        checks++;
        if ((s > w ? s - w : w - s) > 1) begin
          failures++;
          if (failures < 10) $display("got %h want %h", s, w);
        end
      end
      if (i < n) begin
        logic [127:0] ex;
        l = (i == 0) ? '1 : L_W'({$urandom(), $urandom()});
        t = (i == 0) ? '1 : XT_W'({$urandom(), $urandom()});
        ex = 128'(l) * 128'(t);
        q.push_back(S_W'(l) + S_W'(t) + S_W'((ex + (128'd1 << (FW - 1))) >> FW));
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
