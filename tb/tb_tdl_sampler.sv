`timescale 1ns/1ps
// Testbench of the double sampler: random tap words, each must appear on
// therm exactly two rising edges after it was sampled.
module tb_tdl_sampler;
  logic clk = 0, rst_n = 0;
  logic [127:0] taps = 0, therm;
  logic [127:0] hist [$];
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always #1.25 clk = ~clk;
  tdl_sampler dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    #0.1 check(therm == '0, "reset");
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      taps = {$urandom, $urandom, $urandom, $urandom};
      hist.push_back(taps);
      if (n >= 2) check(therm == hist[n-2], $sformatf("sample %0d", n - 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
