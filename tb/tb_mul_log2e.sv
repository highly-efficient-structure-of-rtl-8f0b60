// tb_mul_log2e: checks the x_I estimate against floor(x*log2 e) computed in
// double precision: never more than one off, and exact whenever x*log2 e is
// not within 0.001 of an integer. Also checks the 2-cycle latency.
`timescale 1ns/1ps
module tb_mul_log2e;
  import exp_pkg::*;
  logic clk = 0;
  logic signed [XFIX_W-1:0] x_fix = '0;
  logic signed [XIE_W-1:0] xi_est;
  mul_log2e dut (.clk, .x_fix, .xi_est);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  real xr [$];

  initial begin
    for (int i = 0; i < 4000 + 2; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        real v, f;
        int fl;
        v  = xr.pop_front() * 1.4426950408889634;
        fl = int'($floor(v));
        f  = v - $floor(v);
        checks++;
        if ((xi_est - fl > 1) || (fl - xi_est > 1) || (f > 0.001 && f < 0.999 && xi_est != fl)) begin
          failures++;
          if (failures < 10) $display("x*log2e=%f est=%0d", v, xi_est);
        end
      end
      if (i < 4000) begin
        longint hi;
        logic [61:0] lo;
        hi = longint'($urandom() % 2048) - 1024;     // integer part
        lo = {$urandom(), $urandom()};
        x_fix = {11'(hi), lo};
        xr.push_back(real'(hi) + real'(lo) / 4611686018427387904.0);
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
