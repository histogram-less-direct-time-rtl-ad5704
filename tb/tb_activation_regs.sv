`timescale 1ns/1ps
// Testbench of the activation registers: random writes to both banks,
// dual reads compared with a scoreboard, clear and reset checked.
module tb_activation_regs;
  import dtof_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, we = 0, wbank = 0;
  logic [2:0] waddr = 0, ra = 0, rb = 0;
  acc_t wdata = 0, qa, qb;
  acc_t sa [5], sb [5];
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always #5 clk = ~clk;
  activation_regs dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5; k++) begin sa[k] = 0; sb[k] = 0; end
    for (int k = 0; k < 5; k++) begin
      ra = 3'(k); rb = 3'(k); #1;
      check(qa == 0 && qb == 0, "reset value");
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 1));
      wbank = 1'($urandom_range(0, 1));
      waddr = 3'($urandom_range(0, 4));
      wdata = acc_t'($urandom);
      clr = (n == 200);
      @(posedge clk);
      if (clr) begin
        for (int k = 0; k < 5; k++) begin sa[k] = 0; sb[k] = 0; end
      end else if (we) begin
        if (wbank) sb[waddr] = wdata; else sa[waddr] = wdata;
      end
      #1;
      we = 0; clr = 0;
      ra = 3'($urandom_range(0, 4));
      rb = 3'($urandom_range(0, 4));
      #1;
      check(qa == sa[ra], $sformatf("bank A reg %0d", ra));
      check(qb == sb[rb], $sformatf("bank B reg %0d", rb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
