`timescale 1ns/1ps
// Testbench of the event memory: fills all 512 words with random
// timestamps, then reads them back in random order, one cycle latency.
module tb_event_memory;
  logic clk = 0, we = 0;
  logic [8:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] model [512];
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always #5 clk = ~clk;
  event_memory dut (.*);
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      we = 1; waddr = 9'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 1000; n++) begin
      raddr = 9'($urandom_range(0, 511));
      @(negedge clk);
      check(rdata == model[raddr], $sformatf("word %0d", raddr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
