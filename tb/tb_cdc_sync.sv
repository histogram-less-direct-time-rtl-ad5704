`timescale 1ns/1ps
// Testbench of the 400 -> 100 MHz crossing: random words with random gaps.
// Words sent while a transfer is pending must be dropped (drop pulse) and
// all others must arrive once, in order, each as a one-cycle out_valid.
module tb_cdc_sync;
  logic clk_fast = 0, clk_slow = 0, rst_n = 0, in_valid = 0;
  logic [31:0] in_data = 0, out_data;
  logic out_valid, drop;
  logic [31:0] sent [$];
  int nsent = 0, nrecv = 0, ndrop = 0;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always #1.25 clk_fast = ~clk_fast;
  always #5 clk_slow = ~clk_slow;
  cdc_sync dut (.*);
  initial begin
    repeat (200000) @(posedge clk_fast);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk_fast) if (rst_n && drop) ndrop++;
  always @(posedge clk_slow) if (rst_n && out_valid) begin
    logic [31:0] e;
    e = sent.pop_front();
    check(out_data == e, $sformatf("received %h expected %h", out_data, e));
    nrecv++;
  end
  initial begin
    repeat (4) @(posedge clk_slow);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk_fast);
      in_valid = 1;
      in_data = $urandom;
      nsent++;
      @(negedge clk_fast);
      in_valid = 0;
      if (!drop) sent.push_back(in_data);
      repeat ($urandom_range(0, 30)) @(negedge clk_fast);
    end
    repeat (40) @(negedge clk_fast);
    check(nrecv + ndrop == nsent, $sformatf("received %0d + dropped %0d != sent %0d", nrecv, ndrop, nsent));
    check(ndrop > 10 && nrecv > 100, "both transfers and drops happened");
    $display("sent %0d received %0d dropped %0d", nsent, nrecv, ndrop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
