// tb_int_frac_sep: feeds arguments with an x_I estimate that is exact, one
// too small or one too large, and checks x_I = floor(x*log2 e), x_F =
// x - x_I*ln2 (double-precision reference, 1e-12 tolerance), 0 <= x_F <
// ln2, the correction flag, the +inf/+0 range limits of x_I, that an
// incoming special code is kept, and the 5-cycle latency.
`timescale 1ns/1ps
module tb_int_frac_sep;
  import exp_pkg::*;
  logic clk = 0;
  logic signed [XFIX_W-1:0] x_fix = '0;
  logic signed [XIE_W-1:0]  xi_est = '0;
  special_e special_in = SP_NONE, special_out;
  logic signed [XI_W-1:0] x_i;
  logic [FW-1:0] x_f;
  logic corr;
  int_frac_sep dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  typedef struct { real x; int fl; int delta; special_e sp; } item_t;
  item_t q [$];
  localparam real LN2 = 0.6931471805599453;
  localparam real P62 = 4611686018427387904.0;

  task automatic fail(input string s);
    failures++;
    if (failures < 15) $display("%s", s);
  endtask

  initial begin
    int n = 6000;
    for (int i = 0; i < n + 5; i++) begin
      @(negedge clk);
      if (i >= 5) begin
        item_t w;
        real xf, fr;
        w  = q.pop_front();
        fr = w.x * 1.4426950408889634 - $floor(w.x * 1.4426950408889634);
        xf = real'(x_f) / P62;
        checks++;
        if (w.sp != SP_NONE) begin
          if (special_out != w.sp) fail($sformatf("special kept: got %0d want %0d", special_out, w.sp));
        end else if (w.fl > 1023) begin
          if (special_out != SP_INF) fail($sformatf("x=%f: expected +inf code", w.x));
        end else if (w.fl < -1024) begin
          if (special_out != SP_ZERO) fail($sformatf("x=%f: expected +0 code", w.x));
        end else if (fr > 1e-9 && fr < 1.0 - 1e-9) begin
          if (special_out != SP_NONE || x_i != w.fl || corr != (w.delta != 0))
            fail($sformatf("x=%f: x_i=%0d corr=%b sp=%0d, want %0d delta %0d", w.x, x_i, corr, special_out, w.fl, w.delta));
          checks++;
          if ((xf - (w.x - real'(w.fl) * LN2)) > 1e-12 || ((w.x - real'(w.fl) * LN2) - xf) > 1e-12)
            fail($sformatf("x=%f: x_f=%.15f want %.15f", w.x, xf, w.x - real'(w.fl) * LN2));
        end
        checks++;
        if (x_f > FW'(LN2_C >> (LN2_FW - FW)))
          fail("x_f not below ln2");
      end
      if (i < n) begin
        item_t it;
        longint hi;
        logic [61:0] lo;
        hi = (i % 4 == 0) ? longint'($urandom() % 2048) - 1024 : longint'($urandom() % 1400) - 700;
        lo = {$urandom(), $urandom()};
        x_fix = {11'(hi), lo};
        it.x  = real'(hi) + real'(lo) / P62;
        it.fl = int'($floor(it.x * 1.4426950408889634));
        it.delta = int'($urandom() % 3) - 1;
        it.sp = (i % 97 == 5) ? SP_NAN : SP_NONE;
        xi_est = XIE_W'(it.fl + it.delta);
        special_in = it.sp;
        q.push_back(it);
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
