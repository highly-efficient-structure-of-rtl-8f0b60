// tb_delay_line: checks that delay_line presents each input exactly N
// cycles later, clears on reset, and that N = 0 is a wire.
`timescale 1ns/1ps
module tb_delay_line;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [11:0] d = '0, q, q0;
  delay_line #(.W(12), .N(N)) dut  (.clk, .rst_n, .d, .q);
  delay_line #(.W(12), .N(0)) dut0 (.clk, .rst_n, .d, .q(q0));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [11:0] hist [$];

  initial begin
    repeat (N + 2) @(posedge clk);
    @(negedge clk);
    checks++; if (q != '0) begin failures++; $display("not cleared by reset"); end
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      d = 12'($urandom());
      #1; checks++; if (q0 !== d) failures++;
      hist.push_back(d);
      @(negedge clk);
      if (hist.size() >= N) begin
        logic [11:0] w;
        w = hist.pop_front();
        checks++;
        if (q != w) begin failures++; $display("cycle %0d: q=%h want %h", i, q, w); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
