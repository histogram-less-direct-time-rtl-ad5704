`timescale 1ns/1ps
// Testbench of the LSTM accelerator: random weights and timestamps, event
// and weight memories modelled with one cycle of read latency, output
// compared with the vector-level reference model, start-to-done latency
// compared with 3 + 50 * N + 2 cycles, sleep checked before and after.
module tb_lstm_accel;
  import dtof_pkg::*;
  import lstm_ref_pkg::*;

  localparam int N    = 24;
  localparam int RUNS = 3;
  localparam int XMUL = 13422;
  localparam int XSH  = 16;

  logic clk = 0, rst_n = 0, start = 0;
  logic [$clog2(N)-1:0] ev_raddr;
  logic [TS_W-1:0] ev_rdata;
  logic wm_re;
  logic [$clog2(WROWS)-1:0] wm_raddr;
  logic [WROW_W-1:0] wm_rdata;
  q_t   y;
  logic done, sleep;
  int checks = 0, failures = 0;

  logic [TS_W-1:0]   evmem [N];
  logic [WROW_W-1:0] wmem  [WROWS];

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    ev_rdata <= evmem[ev_raddr];
    if (wm_re) wm_rdata <= wmem[wm_raddr];
  end

  lstm_accel #(.N_EVENTS(N), .XMUL(XMUL), .XSHIFT(XSH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    weights_t w;
    longint ts [];
    q_t exp_y;
    int cyc;
    ts = new[N];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int run = 0; run < RUNS; run++) begin
      w = ref_random(run == 0 ? 256 : 512);
      for (int r = 0; r < WROWS; r++) wmem[r] = ref_row(w, r);
      for (int t = 0; t < N; t++) begin
        ts[t] = (run == 2) ? longint'(2000 + int'($urandom_range(0, 60))) : longint'($urandom_range(0, 4999));
        evmem[t] = TS_W'(ts[t]);
      end
      exp_y = ref_run(w, ts, N, XMUL, XSH);
      check(sleep == 1'b1, "sleep before start");
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      check(sleep == 1'b0, "awake after start");
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      check(y == exp_y, $sformatf("run %0d y=%0d expected %0d", run, y, exp_y));
      check(cyc == 3 + 50 * N + 2, $sformatf("latency %0d expected %0d", cyc, 3 + 50 * N + 2));
      @(negedge clk);
      check(sleep == 1'b1, "sleep after done");
      $display("run %0d: y=%0d (%f of range) expected %0d, %0d cycles", run, y, real'(y) / 1024.0, exp_y, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
