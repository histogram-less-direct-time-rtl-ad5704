`timescale 1ns/1ps
// Testbench of the LSTM controller: records the issued program for a short
// run and checks it against the schedule written out independently here:
// clear, then per timestamp and gate the bias row, W_x row, eight W_h rows
// with broadcast index 0..7 and an activation, six element-wise steps with
// one h write, and finally the FCN product (row 40) and sum (row 41).
// Also checks the event read address per timestamp and the cycle count.
module tb_lstm_controller;
  import dtof_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic [$clog2(N)-1:0] ev_raddr;
  logic wm_re;
  logic [$clog2(WROWS)-1:0] wm_raddr;
  uop_t uop;
  logic [2:0] hsel;
  logic h_we, h_clr, fcn_go, sleep;
  logic [5:0] row_d;
  logic re_d;
  int ev_d;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always #5 clk = ~clk;
  lstm_controller #(.N_EVENTS(N)) dut (.*);
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // delay the read address by the block-RAM latency to align with uop
  always_ff @(posedge clk) begin
    row_d <= wm_raddr;
    re_d  <= wm_re;
    ev_d  <= int'(ev_raddr);
  end

  task automatic expect_op(op_e op, int row, int hs, bit hw, string what);
    @(negedge clk);
    check(uop.op == op, $sformatf("%s: op %s expected %s", what, uop.op.name(), op.name()));
    if (row >= 0) check(re_d && int'(row_d) == row, $sformatf("%s: row %0d expected %0d", what, row_d, row));
    if (hs >= 0) check(int'(hsel) == hs, $sformatf("%s: hsel %0d expected %0d", what, hsel, hs));
    check(h_we == hw, $sformatf("%s: h_we", what));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(sleep, "asleep before start");
    start = 1;
    @(negedge clk);
    start = 0;
    // issue cycle of the clear; it reaches uop one cycle later
    expect_op(OP_CLR, -1, -1, 0, "clear");
    check(h_clr, "h cleared with the clear");
    for (int t = 0; t < N; t++) begin
      for (int g = 0; g < 4; g++) begin
        expect_op(OP_LDB, 10*g, -1, 0, "bias");
        check(ev_d == t, $sformatf("event address %0d expected %0d", ev_d, t));
        expect_op(OP_MACX, 10*g + 1, -1, 0, "W_x");
        for (int j = 0; j < 8; j++) expect_op(OP_MACH, 10*g + 2 + j, j, 0, "W_h");
        expect_op(OP_ACT, -1, -1, 0, "activation");
        check(uop.sig == (g != 2), "sigmoid for f, i, o; tanh for c~");
        check(uop.dbank == (g == 2), "c~ goes to bank B");
      end
      expect_op(OP_MULRR, -1, -1, 0, "f*c");
      check(uop.ra == REG_F && uop.rb == REG_C, "f*c operands");
      expect_op(OP_MACRR, -1, -1, 0, "+i*c~");
      check(uop.ra == REG_I && uop.rb == REG_CT, "i*c~ operands");
      expect_op(OP_STB, -1, -1, 0, "store c");
      expect_op(OP_ACT, -1, -1, 0, "tanh(c)");
      check(uop.asrc && uop.rb == REG_C && !uop.sig, "tanh of c");
      expect_op(OP_MULRR, -1, -1, 0, "o*tanh(c)");
      expect_op(OP_HWR, -1, -1, 1, "h write");
    end
    expect_op(OP_MULWA, 40, -1, 0, "FCN product");
    @(negedge clk);
    check(fcn_go && re_d && int'(row_d) == 41, "FCN sum with bias row");
    @(negedge clk);
    check(sleep, "asleep after the program");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
