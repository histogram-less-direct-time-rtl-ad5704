`timescale 1ns/1ps
// Testbench of the FCN output stage: random products and bias, sum and
// saturation compared with integer arithmetic, one-cycle latency checked.
module tb_fcn_reduce;
  import dtof_pkg::*;
  logic clk = 0, rst_n = 0, go = 0;
  acc_t acc [NPE];
  q_t   bias = 0, y;
  logic y_valid;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always #5 clk = ~clk;
  fcn_reduce dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    longint s;
    q_t e;
    for (int k = 0; k < NPE; k++) acc[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      s = 0;
      for (int k = 0; k < NPE; k++) begin
        acc[k] = (n < 80) ? acc_t'(int'($urandom_range(0, 4095)) - 2048)
                          : acc_t'(int'($urandom_range(0, 65535)) - 32768);
        s += longint'(acc[k]);
      end
      bias = q_t'(int'($urandom_range(0, 2047)) - 1024);
      s += longint'(bias);
      e = (s > 32767) ? q_t'(32767) : (s < -32768) ? q_t'(-32768) : q_t'(s);
      go = 1;
      @(negedge clk);
      go = 0;
      check(y_valid == 1'b1, "y_valid one cycle after go");
      check(y == e, $sformatf("y=%0d expected %0d", y, e));
      @(negedge clk);
      check(y_valid == 1'b0, "y_valid is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
