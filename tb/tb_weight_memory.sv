`timescale 1ns/1ps
// Testbench of the weight memory: writes random rows, reads them back with
// one cycle of latency, checks that read enable holds the output.
module tb_weight_memory;
  import dtof_pkg::*;
  logic clk = 0, we = 0, re = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [127:0] wdata = 0, rdata;
  logic [127:0] model [WROWS];
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always #5 clk = ~clk;
  weight_memory dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int r = 0; r < WROWS; r++) begin
      @(negedge clk);
      we = 1; waddr = 6'(r);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      model[r] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 200; n++) begin
      int r;
      r = int'($urandom_range(0, WROWS - 1));
      raddr = 6'(r); re = 1;
      @(negedge clk);
      check(rdata == model[r], $sformatf("row %0d", r));
      re = 0; raddr = 6'((r + 1) % WROWS);
      @(negedge clk);
      check(rdata == model[r], "read enable low holds data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
