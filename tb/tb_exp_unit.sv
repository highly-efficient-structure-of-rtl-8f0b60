// tb_exp_unit: one exp() unit against the simulator's $exp. Random
// arguments over the whole useful range (and tiny ones), directed special
// values; every result within 1 ulp (subnormal results expected as +0),
// every result exactly 30 cycles after its argument, one argument per
// clock with gaps in the valid stream.
`timescale 1ns/1ps
module tb_exp_unit;
  import exp_ref_pkg::*;
  localparam int LAT = 30;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [63:0] x = '0, y;
  exp_unit dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  logic [63:0] xq [$];
  longint dq [$];

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      logic [63:0] a, w;
      longint due;
      checks += 2;
      if (xq.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        a = xq.pop_front(); due = dq.pop_front(); w = ref_exp(a);
        if (cycle != due) begin failures++; $display("latency: at %0d due %0d", cycle, due); end
        if (!((w[62:52] == 11'h7FF && w[51:0] != 0) ? (y == w) :
              (y[63] == 0 && ulp_diff(y, w) <= 1) ||
              (w == 0 && y == 64'h0010_0000_0000_0000))) begin
          failures++;
          if (failures < 10) $display("x=%h (%g): got %h want %h", a, $bitstoreal(a), y, w);
        end
      end
    end
  end

  initial begin
    logic [63:0] dir [] = '{64'h0, 64'h3FF0_0000_0000_0000, 64'hBFF0_0000_0000_0000,
      64'h4086_2E42_FEFA_39EF, 64'h4086_2E42_FEFA_39F0, 64'hC086_232B_DD7A_BCD2,
      64'h7FF0_0000_0000_0000, 64'hFFF0_0000_0000_0000, 64'hFFF8_0000_0000_0000,
      64'h3E40_0000_0000_0000, 64'hBC90_0000_0000_0000};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < dir.size() + 4000; i++) begin
      @(negedge clk);
      if (i % 7 == 3) begin in_valid = 0; continue; end
      in_valid = 1;
      x = (i < dir.size()) ? dir[i] :
          (i % 2) ? $realtobits((real'($urandom()) / 4294967296.0) * 1460.0 - 748.0)
                  : rand_dbl(1023 - 60, 1023 + 5);
      xq.push_back(x);
      dq.push_back(cycle + LAT);   // sampled at the next edge, result LAT edges later
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (xq.size() != 0) begin failures++; $display("%0d results missing", xq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
