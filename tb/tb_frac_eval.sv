// tb_frac_eval: for random x_F in [0, ln2) checks, 2 cycles later, each
// table word against a double-precision reference (e^xM, e^xD - 1,
// e^xL - 1), that the Maclaurin output equals the low 35 bits x_T, and
// that m*(1+d)*(1+l)*(1+t) reproduces e^x_F to double precision.
`timescale 1ns/1ps
module tb_frac_eval;
  import exp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [FW-1:0] x_f = '0;
  logic [M_W-1:0] m;
  logic [D_W-1:0] d;
  logic [L_W-1:0] l;
  logic [XT_W-1:0] t;
  frac_eval dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam real P62 = 4611686018427387904.0;
  logic [FW-1:0] q [$];

  function automatic real em1(input real v);
    return v * (1.0 + v/2.0 * (1.0 + v/3.0 * (1.0 + v/4.0 * (1.0 + v/5.0 * (1.0 + v/6.0)))));
  endfunction

  task automatic cmp(input string nm, input real got, input real want, input real tol);
    checks++;
    if (got - want > tol || want - got > tol) begin
      failures++;
      if (failures < 10) $display("%s: got %.20f want %.20f", nm, got, want);
    end
  endtask

  initial begin
    int n = 3000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < n + 2; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        logic [FW-1:0] w;
        real vm, vd, vl, vt, all;
        w  = q.pop_front();
        vm = real'(w[61:53]) / 512.0;
        vd = real'(w[52:44]) / 262144.0;
        vl = real'(w[43:35]) / 134217728.0;
        vt = real'(w[34:0]) / P62;
        cmp("m", real'(m) / P62, $exp(vm), 4.0e-16);
        cmp("d", real'(d) / P62, em1(vd), 1.0e-18);
        cmp("l", real'(l) / P62, em1(vl), 1.0e-18);
        checks++;
        if (t != w[34:0]) failures++;
        all = (real'(m) / P62) * (1.0 + real'(d) / P62) * (1.0 + real'(l) / P62) * (1.0 + real'(t) / P62);
        cmp("product", all, $exp(real'(w) / P62), 1.0e-15);
      end
      if (i < n) begin
        x_f = FW'({$urandom(), $urandom()});
        if (x_f > FW'(LN2_C >> (LN2_FW - FW))) x_f = x_f >> 1;
        q.push_back(x_f);
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
