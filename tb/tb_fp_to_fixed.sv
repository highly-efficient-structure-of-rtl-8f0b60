// tb_fp_to_fixed: checks the double-to-fixed conversion against an
// integer reference built with multiplication and division by powers of
// two, the 5-cycle latency and the classification of special arguments.
`timescale 1ns/1ps
module tb_fp_to_fixed;
  import exp_pkg::*;
  import exp_ref_pkg::*;
  logic clk = 0;
  logic [63:0] x = '0;
  logic signed [XFIX_W-1:0] x_fix;
  special_e special;
  fp_to_fixed dut (.clk, .x, .x_fix, .special);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  typedef struct { logic signed [XFIX_W-1:0] v; special_e sp; } exp_t;
  exp_t q [$];

  function automatic exp_t model(input logic [63:0] a);
    exp_t r;
    logic [127:0] mag;
    int e;
    e = int'(a[62:52]);
    r.sp = SP_NONE; r.v = '0;
    if (e == 2047) r.sp = (a[51:0] != 0) ? SP_NAN : (a[63] ? SP_ZERO : SP_INF);
    else if (e >= 1033) r.sp = a[63] ? SP_ZERO : SP_INF;
    else if (e != 0) begin
      mag = {75'd0, 1'b1, a[51:0]};
      // value * 2^62 = mant * 2^(e - 1075 + 62)
      if (e >= 1013) mag = mag * (128'd1 << (e - 1013));
      else if (1013 - e < 100) mag = mag / (128'd1 << (1013 - e));
      else mag = 0;
      r.v = a[63] ? -XFIX_W'(mag) : XFIX_W'(mag);
    end
    return r;
  endfunction

  logic [63:0] args [$];
  initial begin
    args = '{64'h0, 64'h3FF0_0000_0000_0000, 64'hBFF8_0000_0000_0000,
             64'h408F_FFFF_FFFF_FFFF, 64'h4090_0000_0000_0000, 64'hC090_0000_0000_0000,
             64'h7FF0_0000_0000_0000, 64'hFFF0_0000_0000_0000, 64'h7FF0_0000_0000_0010,
             64'h3C10_0000_0000_0000, 64'h3C20_0000_0000_0001, 64'h0000_0000_0000_0001};
    for (int i = 0; i < 3000; i++) args.push_back(rand_dbl(900, 1040));
    for (int i = 0; i < args.size() + 5; i++) begin
      @(negedge clk);
      if (i >= 5) begin   // output of the argument applied 5 edges ago
        exp_t w;
        w = q.pop_front();
        checks++;
        if (special != w.sp || (w.sp == SP_NONE && x_fix != w.v)) begin
          failures++;
          if (failures < 10) $display("arg %h: got %h/%0d want %h/%0d", args[i-5], x_fix, special, w.v, w.sp);
        end
      end
      if (i < args.size()) begin x = args[i]; q.push_back(model(args[i])); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
