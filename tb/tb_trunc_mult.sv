// tb_trunc_mult: checks the reduced-width multiplier (64 x 53 bits, 56
// low columns dropped, 6 cycles) against the exact product from the
// simulator's wide arithmetic: the result must lie between the exact
// floor(a*b / 2^56) minus the tile count and that floor itself, and
// arrive exactly 6 cycles after its operands. Edge operands (all ones,
// zero, one) are included.
`timescale 1ns/1ps
module tb_trunc_mult;
  localparam int AW = 64, BW = 53, TRUNC = 56, LAT = 6, NT = 4 * 4;
  logic clk = 0;
  logic [AW-1:0] a = '0;
  logic [BW-1:0] b = '0;
  logic [AW+BW-TRUNC-1:0] p;
  trunc_mult #(.AW(AW), .BW(BW), .TRUNC(TRUNC), .TILE(17), .LATENCY(LAT)) dut (.clk, .a, .b, .p);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [AW+BW-TRUNC-1:0] q [$];

  initial begin
    int n = 3000;
    for (int i = 0; i < n + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        logic [AW+BW-TRUNC-1:0] w;
        w = q.pop_front();
        checks++;
        if (p > w || w - p > NT) begin
          failures++;
          if (failures < 10) $display("got %h want %h", p, w);
        end
      end
      if (i < n) begin
        case (i)
          0: begin a = '1; b = '1; end
          1: begin a = '0; b = '1; end
          2: begin a = 64'd1 << 62; b = '1; end
          default: begin a = {$urandom(), $urandom()}; b = BW'({$urandom(), $urandom()}); end
        endcase
        q.push_back((AW+BW-TRUNC)'(((AW+BW)'(a) * (AW+BW)'(b)) >> TRUNC));
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
