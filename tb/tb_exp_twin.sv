// tb_exp_twin: end-to-end test of the twin exp() pipeline at its default
// (and only) size.
//
// Streams vectors of doubles through both lanes, two per clock, the way a
// board streams 128-bit memory words: a block of directed arguments
// (special values, range limits, tiny and negative arguments), then the
// vector lengths 10, 100, 1000, 10^4 and 10^5 of the throughput
// comparison, with random arguments across the whole useful range.
// Every result is compared with the simulator's $exp (at most 1 ulp apart,
// subnormal results expected as +0), every result must appear exactly 30
// cycles after its argument, and each vector must stream without gaps
// (N/2 + 30 cycles from first argument to last result).
// The run also counts how often each mechanism of the design was used:
// x_I correction in the separation stage, an exponent adjustment in
// normalization (shift or rounding carry), and
// results forced to +inf, +0 and NaN; one that never happens is a failure.
// It reports how many results differ from $exp by one ulp and the RMS
// difference in ulp.
`timescale 1ns/1ps
module tb_exp_twin;
  import exp_ref_pkg::*;

  localparam int LAT = 30;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         in_valid = 1'b0;
  logic [127:0] in_data = '0;
  logic         out_valid;
  logic [127:0] out_data;

  exp_twin dut (.*);

  always #2.5 clk = ~clk;   // 200 MHz

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results, in issue order
  logic [127:0] exp_q [$];
  logic [127:0] arg_q [$];
  longint       due_q [$];

  // mechanism counters
  // accuracy statistics against $exp over finite non-zero results
  longint n_acc = 0, n_1ulp = 0;
  int n_corr = 0, n_shift = 0, n_inf = 0, n_zero = 0, n_nan = 0;
  logic [LAT-1:0] vpipe = '0;
  always @(posedge clk) vpipe <= {vpipe[LAT-2:0], in_valid};
  // sampled between edges: vpipe[k] marks a stage output k+1 cycles old
  always @(negedge clk) begin
    if (vpipe[11] && dut.g_lane[0].u_exp.sep_corr) n_corr++;
    if (vpipe[11] && dut.g_lane[1].u_exp.sep_corr) n_corr++;
    if (vpipe[28] && (dut.g_lane[0].u_exp.u_norm.sh || dut.g_lane[0].u_exp.u_norm.mant_r[52])) n_shift++;
    if (vpipe[28] && (dut.g_lane[1].u_exp.u_norm.sh || dut.g_lane[1].u_exp.u_norm.mant_r[52])) n_shift++;
  end

  function automatic bit close(input logic [63:0] got, input logic [63:0] want);
    if (want[62:52] == 11'h7FF && want[51:0] != '0)
      return got == 64'h7FF8_0000_0000_0000;
    if (got[63] != 1'b0) return 1'b0;
    if (ulp_diff(got, want) <= 1) return 1'b1;
    // at the subnormal boundary: smallest normal against flushed zero
    if (want == 64'd0 && got[62:52] == 11'd1 && got[51:0] == '0) return 1'b1;
    if (got == 64'd0 && want[62:52] == 11'd1 && want[51:40] == '0) return 1'b1;
    return 1'b0;
  endfunction

  // check outputs as they come
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [127:0] w, a;
      longint due;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output at cycle %0d", cycle);
      end else begin
        w = exp_q.pop_front(); a = arg_q.pop_front(); due = due_q.pop_front();
        for (int k = 0; k < 2; k++) begin
          checks++;
          if (!close(out_data[64*k +: 64], w[64*k +: 64])) begin
            failures++;
            if (failures < 20)
              $display("MISMATCH lane %0d x=%h (%g) got %h want %h", k,
                       a[64*k +: 64], $bitstoreal(a[64*k +: 64]),
                       out_data[64*k +: 64], w[64*k +: 64]);
          end
          if (w[64*k+52 +: 11] != 11'h7FF && w[64*k +: 63] != '0) begin
            n_acc++;
            if (ulp_diff(out_data[64*k +: 64], w[64*k +: 64]) != 0) n_1ulp++;
          end
          if (out_data[64*k +: 64] == 64'h7FF0_0000_0000_0000) n_inf++;
          if (out_data[64*k +: 64] == 64'd0) n_zero++;
          if (out_data[64*k +: 62+1] == 63'h7FF8_0000_0000_0000) n_nan++;
        end
        checks++;
        if (cycle != due) begin
          failures++;
          $display("latency: result at cycle %0d, due %0d", cycle, due);
        end
      end
    end
  end

  task automatic issue(input logic [63:0] x0, input logic [63:0] x1);
    in_valid <= 1'b1;
    in_data  <= {x1, x0};
    exp_q.push_back({ref_exp(x1), ref_exp(x0)});
    arg_q.push_back({x1, x0});
    due_q.push_back(cycle + LAT + 1);   // sampled on the next edge
    @(posedge clk);
  endtask

  task automatic idle(input int n);
    in_valid <= 1'b0;
    repeat (n) @(posedge clk);
  endtask

  function automatic logic [63:0] rand_arg();
    real r;
    case ($urandom() % 4)
      0: return rand_dbl(1023 - 60, 1023 + 9);          // any magnitude < 1024
      1: return $realtobits((real'($urandom()) / 4294967296.0) * 1460.0 - 748.0);
      2: return $realtobits((real'($urandom()) / 4294967296.0) * 2.0 - 1.0);
      default: begin
        r = (real'($urandom()) / 4294967296.0) * 40.0 - 20.0;
        return $realtobits(r);
      end
    endcase
  endfunction

  // Directed arguments.
  logic [63:0] directed [] = '{
    64'h0000_0000_0000_0000,   // +0 -> 1
    64'h8000_0000_0000_0000,   // -0 -> 1
    64'h3FF0_0000_0000_0000,   // 1 -> e
    64'hBFF0_0000_0000_0000,   // -1
    64'h3FE6_2E42_FEFA_39EF,   // ln 2
    64'hBFE6_2E42_FEFA_39EF,   // -ln 2
    64'h4086_2E42_FEFA_39EF,   // 709.78 (largest finite result)
    64'h4086_2E42_FEFA_39F0,   // just above: +inf
    64'h408F_4000_0000_0000,   // 1000 -> +inf
    64'hC08F_4000_0000_0000,   // -1000 -> +0
    64'hC086_232B_DD7A_BCD2,   // -708.3964 (smallest normal result)
    64'hC087_0000_0000_0000,   // -736 -> subnormal -> +0
    64'h7FF0_0000_0000_0000,   // +inf
    64'hFFF0_0000_0000_0000,   // -inf
    64'h7FF8_0000_0000_0001,   // NaN
    64'h3C90_0000_0000_0000,   // 2^-54
    64'hBC90_0000_0000_0000,   // -2^-54
    64'h3E40_0000_0000_0000,   // 2^-27
    64'hBE40_0000_0000_0000,   // -2^-27
    64'h0000_0000_0000_0001,   // smallest subnormal
    64'h4340_0000_0000_0000,   // 2^53
    64'hC340_0000_0000_0000    // -2^53
  };

  initial begin : main
    int sizes [5] = '{10, 100, 1000, 10000, 100000};
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    for (int i = 0; i < directed.size(); i += 2)
      issue(directed[i], directed[(i + 1) % directed.size()]);
    for (int i = 0; i < directed.size(); i++)     // each in the other lane
      issue(rand_arg(), directed[i]);
    idle(LAT + 5);

    foreach (sizes[s]) begin
      longint t0;
      t0 = cycle;
      for (int i = 0; i < sizes[s]; i += 2) issue(rand_arg(), rand_arg());
      in_valid <= 1'b0;
      wait (exp_q.size() == 0);
      @(negedge clk);
      checks++;
      // N/2 issue cycles, LAT cycles latency, one cycle to observe the end
      if (cycle != t0 + sizes[s] / 2 + LAT + 1) begin
        failures++;
        $display("vector %0d: took until cycle %0d, expected %0d", sizes[s],
                 cycle, t0 + sizes[s] / 2 + LAT + 1);
      end
      $display("vector of %0d doubles streamed in %0d cycles", sizes[s], cycle - t0);
      @(posedge clk);
    end
    idle(5);

    $display("mechanisms: x_I corrections %0d, normalization adjustments %0d, +inf %0d, +0 %0d, NaN %0d",
             n_corr, n_shift, n_inf, n_zero, n_nan);
    $display("accuracy: %0d finite results, %0d differ from $exp by 1 ulp, RMS difference %f ulp",
             n_acc, n_1ulp, $sqrt(real'(n_1ulp) / real'(n_acc)));
    checks += 5;
    if (n_corr == 0)  failures++;
    if (n_shift == 0) failures++;
    if (n_inf == 0)   failures++;
    if (n_zero == 0)  failures++;
    if (n_nan == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
