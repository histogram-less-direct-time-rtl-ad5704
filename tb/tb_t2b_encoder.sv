`timescale 1ns/1ps
// Testbench of the thermometer-to-binary encoder: sequences of idle (all
// zero), edge in flight (k low ones, sometimes with a bubble) and saturated
// (all ones) codes; after two cycles fine must equal the number of ones and
// hit must be high only for the first sample whose tap 0 is high.
module tb_t2b_encoder;
  logic clk = 0, rst_n = 0;
  logic [127:0] therm = 0;
  logic hit;
  logic [7:0] fine;
  int exp_fine [$];
  bit exp_hit [$];
  bit prev0 = 0;
  int hits = 0, bubbles = 0;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always #1.25 clk = ~clk;
  t2b_encoder dut (.*);
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int k, kind, ones;
      @(negedge clk);
      kind = int'($urandom_range(0, 3));
      k = int'($urandom_range(1, 127));
      case (kind)
        0, 1: therm = '0;
        2: therm = (128'(1) << k) - 1;
        default: therm = '1;
      endcase
      if (kind == 2 && k > 4 && $urandom_range(0, 3) == 0) begin
        therm[k-2] = 1'b0;   // bubble below the edge
        therm[k+1] = 1'b1;   // and one above it
        bubbles++;
      end
      ones = $countones(therm);
      exp_fine.push_back(ones);
      exp_hit.push_back(therm[0] && !prev0);
      if (therm[0] && !prev0) hits++;
      prev0 = therm[0];
      if (n >= 2) begin
        check(int'(fine) == exp_fine[n-2], $sformatf("fine %0d expected %0d", fine, exp_fine[n-2]));
        check(hit == exp_hit[n-2], "hit flag");
      end
    end
    check(hits > 100 && bubbles > 20, "coverage of hits and bubbles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
