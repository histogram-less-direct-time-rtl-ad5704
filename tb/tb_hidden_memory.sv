`timescale 1ns/1ps
// Testbench of the hidden-state memory: parallel writes of random vectors,
// every element read back through the broadcast port, clear checked.
module tb_hidden_memory;
  import dtof_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, we = 0;
  q_t   wdata [NPE];
  logic [2:0] rsel = 0;
  q_t   bcast;
  q_t   model [NPE];
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always #5 clk = ~clk;
  hidden_memory dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < NPE; k++) begin wdata[k] = '0; model[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      for (int k = 0; k < NPE; k++) wdata[k] = q_t'($urandom);
      we  = (n % 3 != 2);
      clr = (n == 10);
      @(negedge clk);
      if (clr) for (int k = 0; k < NPE; k++) model[k] = '0;
      else if (we) model = wdata;
      we = 0; clr = 0;
      for (int j = 0; j < NPE; j++) begin
        rsel = 3'(j);
        #1;
        check(bcast == model[j], $sformatf("h[%0d]=%0d expected %0d", j, bcast, model[j]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
