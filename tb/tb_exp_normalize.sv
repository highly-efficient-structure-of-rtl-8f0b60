// tb_exp_normalize: checks the final packing of 2^x_I * R into a double.
// The reference converts R to a double with the simulator's own rounding
// and scales it by 2^x_I, so any result not on a rounding tie must match
// exactly. Covered: R in [1, 2), R >= 2 (right shift), rounding carry into
// the exponent, overflow to +inf, flushing to +0 below the smallest
// normal, and the three special codes. Latency 1 cycle.
`timescale 1ns/1ps
module tb_exp_normalize;
  import exp_pkg::*;
  logic clk = 0;
  logic [P_W-1:0] r = '0;
  logic signed [XI_W-1:0] x_i = '0;
  special_e special = SP_NONE;
  logic [63:0] y;
  logic shifted;
  exp_normalize dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_shift = 0;
  localparam real P62 = 4611686018427387904.0;

  function automatic logic [63:0] model(input logic [P_W-1:0] rr, input int xi, input special_e sp);
    real v;
    logic [63:0] b;
    if (sp == SP_NAN)  return DBL_QNAN;
    if (sp == SP_INF)  return DBL_INF;
    if (sp == SP_ZERO) return 64'd0;
    v = real'(rr) / P62;          // rounded to 53 bits by the simulator
    b = $realtobits(v);
    if (int'(b[62:52]) + xi >= 2047) return DBL_INF;
    if (int'(b[62:52]) + xi <= 0)    return 64'd0;
    return {1'b0, 11'(int'(b[62:52]) + xi), b[51:0]};
  endfunction

  task automatic apply(input logic [P_W-1:0] rr, input int xi, input special_e sp);
    logic [63:0] w;
    r = rr; x_i = XI_W'(xi); special = sp;
    w = model(rr, xi, sp);
    @(negedge clk);
    checks++;
    if (shifted) n_shift++;
    // ties (bits below the kept 53 exactly one half) may round either way
    if (y != w && !(rr[9:0] == 10'h200 || rr[10:0] == 11'h400)) begin
      failures++;
      if (failures < 10) $display("r=%h xi=%0d sp=%0d: got %h want %h", rr, xi, sp, y, w);
    end
  endtask

  initial begin
    @(negedge clk);
    apply(64'h4000_0000_0000_0000, 0, SP_NONE);          // 1.0
    apply(64'h7FFF_FFFF_FFFF_FFFF, 0, SP_NONE);          // carry to 2.0
    apply(64'h8000_0000_0000_0100, -1, SP_NONE);         // R >= 2
    apply(64'h8000_0000_0000_0000, 1023, SP_NONE);       // 2^1024 -> inf
    apply(64'h7FFF_FFFF_FFFF_F000, 1023, SP_NONE);       // largest finite
    apply(64'h4000_0000_0000_0000, -1022, SP_NONE);      // smallest normal
    apply(64'h7FFF_0000_0000_0000, -1023, SP_NONE);      // subnormal -> 0
    apply(64'h4000_0000_0000_0000, -1024, SP_NONE);
    apply(64'h4123_0000_0000_0000, 5, SP_NAN);
    apply(64'h4123_0000_0000_0000, 5, SP_INF);
    apply(64'h4123_0000_0000_0000, 5, SP_ZERO);
    for (int i = 0; i < 5000; i++) begin
      logic [P_W-1:0] rr;
      rr = {2'b01, 62'({$urandom(), $urandom()})};
      if (i % 10 == 0) rr = {2'b10, 62'($urandom() % 4096)};   // just above 2
      apply(rr, int'($urandom() % 2048) - 1024, SP_NONE);
    end
    checks++;
    if (n_shift == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
