`timescale 1ns/1ps
// Ranging sweep on the full system at its default size: one set of
// weights, then twelve depth-dots of 512 photons at target distances
// spread from 0.05 m to 15 m, each with a different signal-to-background
// ratio, as in a ranging characterisation. Every stored timestamp is
// checked against its pulse time and every depth output against the
// reference LSTM run on the stored timestamps; processing time per point
// is checked too. The weights are random, so the outputs are not
// distances: the sweep exercises the arithmetic over the whole range.
module tb_ranging_sweep;
  import dtof_pkg::*;
  import lstm_ref_pkg::*;

  localparam int    N     = EVENTS;
  localparam real   C_MPS = 0.299792458;  // m per ns
  localparam real   T_LAS = 100.0;        // laser period, ns

  logic clk400 = 0, clk100 = 0, rst_n = 0;
  logic spad_hit = 0, laser_trig;
  logic host_start = 0, host_done, busy, accel_sleep;
  q_t   depth;
  logic [15:0] dropped;
  logic dma_restart = 0, dma_valid = 0, dma_ready, dma_loaded;
  logic [31:0] dma_data = 0;
  logic ts_store;
  logic [8:0] ts_addr;
  logic [31:0] ts_data;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always #1.25 clk400 = ~clk400;
  always #5    clk100 = ~clk100;

  dtof_top dut (.*);

  initial begin
    repeat (6000000) @(posedge clk100);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_ignored = 0, n_wrap = 0, n_sleep_wake = 0, n_reload = 0, n_writes = 0;
  realtime t_laser = 0;
  int expq [$];
  longint stored [];
  int proc_cycles = 0;

  always @(posedge laser_trig) t_laser = $realtime;

  // every event-memory write against the expected timestamp
  always @(posedge clk100) if (rst_n) begin
    if (ts_store) begin
      int e, d, a;
      a = int'(ts_addr);
      check(a == n_writes, "events stored in arrival order");
      e = expq.pop_front();
      d = int'(ts_data) - e;
      if (d > 2500) d -= 5000;
      if (d < -2500) d += 5000;
      check(d >= -1 && d <= 1, $sformatf("stored ts %0d expected %0d", ts_data, e));
      stored[a] = longint'(ts_data);
      n_writes++;
    end
    if (!accel_sleep) proc_cycles++;
  end

  function automatic int expect_ts(realtime dt);
    int b;
    b = int'($ceil(dt / 0.020 - 1e-6));
    return ((b % 5000) + 5000) % 5000;
  endfunction

  // one SPAD pulse at the given offset after the next laser edge
  // (pair: a second pulse 15 ns later, which the crossing must drop);
  // then 60 ns of dead time before the next photon
  task automatic photon(realtime off, bit record, bit pair = 0);
    @(posedge laser_trig);
    #(off);
    if (record) expq.push_back(expect_ts($realtime - t_laser));
    spad_hit = 1;
    #4;
    spad_hit = 0;
    if (pair) begin
      #11;
      spad_hit = 1;
      #4;
      spad_hit = 0;
    end
    #60;
  endtask

  task automatic load_weights(weights_t w);
    @(negedge clk100);
    dma_restart = 1;
    @(negedge clk100);
    dma_restart = 0;
    for (int r = 0; r < WROWS; r++) begin
      logic [WROW_W-1:0] row;
      row = ref_row(w, r);
      for (int j = 0; j < 4; j++) begin
        while (!dma_ready) @(negedge clk100);
        dma_valid = 1;
        dma_data = row[32*j +: 32];
        @(negedge clk100);
      end
    end
    dma_valid = 0;
    repeat (2) @(negedge clk100);
    check(dma_loaded, "weights loaded");
    n_reload++;
  endtask

  task automatic depth_dot(real dist_m, real p_signal, weights_t w);
    realtime tof;
    q_t exp_y;
    int cyc;
    tof = 2.0 * dist_m / C_MPS;
    n_writes = 0;
    proc_cycles = 0;
    // photons before start are not stored
    repeat (3) begin photon($urandom_range(0, 90000) * 0.001, 0); n_ignored++; end
    #300;
    check(accel_sleep, "accelerator asleep before the depth-dot");
    @(negedge clk100);
    host_start = 1;
    @(negedge clk100);
    host_start = 0;
    check(busy, "busy after start");
    for (int n = 0; n < N; n++) begin
      realtime off;
      if (n % 64 == 5) begin
        off = 99.0 + $urandom_range(0, 990) * 0.001;   // wraps the coarse count
        n_wrap++;
      end else if ($urandom_range(0, 999) < int'(p_signal * 1000.0)) begin
        real g;
        g = 0.0;
        for (int k = 0; k < 4; k++) g += $urandom_range(0, 1000) * 0.001 - 0.5;
        off = tof + 0.2 * g;
        if (off < 0.0) off = 0.0;
        if (off > 99.9) off = 99.9;
      end else begin
        off = $urandom_range(0, 99900) * 0.001;
      end
      photon(off, 1, n % 100 == 50);
      if (n < N - 1) check(accel_sleep, "asleep while acquiring");
    end
    // processing
    cyc = 0;
    while (!host_done) begin
      @(negedge clk100);
      cyc++;
      if (cyc == 10 && !accel_sleep) n_sleep_wake++;
    end
    check(n_writes == N, $sformatf("%0d timestamps stored", n_writes));
    exp_y = ref_run(w, stored, N, 13422, 16);
    check(depth == exp_y, $sformatf("depth %0d expected %0d", depth, exp_y));
    check(proc_cycles == 50 * N + 4, $sformatf("accelerator awake %0d cycles, expected %0d", proc_cycles, 50 * N + 4));
    @(negedge clk100);
    @(negedge clk100);
    check(!busy && accel_sleep, "idle and asleep after done");
    $display("depth-dot at %0.2f m: output %0d (%0.4f of range), %0d processing cycles",
             dist_m, depth, real'(depth) / 1024.0, proc_cycles);
  endtask

  initial begin
    weights_t w;
    real dists [12] = '{0.05, 1.0, 2.5, 4.0, 5.5, 7.0, 8.89, 10.0, 11.5, 13.0, 14.2, 14.95};
    stored = new[N];
    repeat (4) @(posedge clk100);
    rst_n = 1;
    w = ref_random(384);
    load_weights(w);
    for (int p = 0; p < 12; p++) depth_dot(dists[p], 0.2 + 0.05 * p, w);
    check(n_sleep_wake == 12, "accelerator woke for each point");
    check(int'(dropped) == 12 * ((N - 1 - 50) / 100 + 1), $sformatf("%0d photons dropped", dropped));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
