// tb_exp_lut: reads every word of the three tables (MSB, MID, LSB
// configurations) and compares it with e^v, e^v - 1 computed in double
// precision from a short Taylor sum, within the reference's own accuracy.
// Also checks the one-cycle read latency.
`timescale 1ns/1ps
module tb_exp_lut;
  import exp_pkg::*;
  logic clk = 0;
  logic [8:0] a = '0;
  logic [63:0] q_msb;
  logic [52:0] q_mid;
  logic [43:0] q_lsb;
  exp_lut #(.IDX_W(9), .LSB_EXP(9),  .OUT_W(64), .ADD_ONE(1'b1)) u_msb (.clk, .a, .q(q_msb));
  exp_lut #(.IDX_W(9), .LSB_EXP(18), .OUT_W(53), .ADD_ONE(1'b0)) u_mid (.clk, .a, .q(q_mid));
  exp_lut #(.IDX_W(9), .LSB_EXP(27), .OUT_W(44), .ADD_ONE(1'b0)) u_lsb (.clk, .a, .q(q_lsb));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam real P62 = 4611686018427387904.0;

  function automatic real expm1_small(input real v);
    return v * (1.0 + v/2.0 * (1.0 + v/3.0 * (1.0 + v/4.0 * (1.0 + v/5.0 * (1.0 + v/6.0)))));
  endfunction

  task automatic cmp(input string nm, input int i, input real got, input real want, input real tol);
    checks++;
    if (got - want > tol || want - got > tol) begin
      failures++;
      if (failures < 10) $display("%s[%0d]: got %.20f want %.20f", nm, i, got, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      a = 9'(i);
      @(negedge clk);
      // MSB: only indices below ln2*512 are ever read, but all are checked
      cmp("msb", i, real'(q_msb) / P62, $exp(real'(i) / 512.0), 4.0e-16);
      cmp("mid", i, real'(q_mid) / P62, expm1_small(real'(i) / 262144.0), 1.0e-18);
      cmp("lsb", i, real'(q_lsb) / P62, expm1_small(real'(i) / 134217728.0), 1.0e-18);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
