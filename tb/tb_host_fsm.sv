`timescale 1ns/1ps
// Testbench of the system state machine with a small event count:
// timestamps before start are ignored, EVENTS writes at addresses
// 0..EVENTS-1, one accel_start, no writes while processing, done after
// accel_done, back to idle, then a second depth-dot.
module tb_host_fsm;
  localparam int E = 16;
  logic clk = 0, rst_n = 0, start = 0, ts_valid = 0, accel_done = 0;
  logic ev_we, accel_start, done, busy;
  logic [3:0] ev_waddr;
  int writes = 0, starts = 0, dones = 0, next_addr = 0;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always #5 clk = ~clk;
  host_fsm #(.EVENTS(E)) dut (.*);
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n) begin
    if (ev_we) begin
      check(int'(ev_waddr) == next_addr, $sformatf("address %0d expected %0d", ev_waddr, next_addr));
      next_addr = (next_addr + 1) % E;
      writes++;
    end
    if (accel_start) starts++;
    if (done) dones++;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int dot = 0; dot < 2; dot++) begin
      repeat (3) begin @(negedge clk); ts_valid = 1; @(negedge clk); ts_valid = 0; end
      check(writes == dot * E, "timestamps ignored while idle");
      check(!busy, "idle");
      start = 1; @(negedge clk); start = 0;
      check(busy, "busy after start");
      for (int n = 0; n < E + 5; n++) begin
        ts_valid = 1; @(negedge clk); ts_valid = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      check(writes == (dot + 1) * E, $sformatf("%0d writes", writes));
      check(starts == dot + 1, "one accelerator start");
      repeat (10) @(negedge clk);
      check(dones == dot, "no done before accel_done");
      accel_done = 1; @(negedge clk); accel_done = 0;
      @(negedge clk);
      check(dones == dot + 1, "done pulse");
      @(negedge clk);
      check(!busy, "idle again");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
