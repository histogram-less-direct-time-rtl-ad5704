`timescale 1ns/1ps
// Testbench of the whole TDC: SPAD pulses at random times relative to the
// laser trigger; each timestamp must equal ceil((t_hit - t_laser) / 20 ps)
// modulo the 5000-bin laser period (+-1 bin for rounding at tap
// boundaries). Includes hits just before a laser edge (the coarse counter
// has wrapped) and pairs of hits 15 ns apart (the second is dropped).
module tb_tdc;
  logic clk400 = 0, clk100 = 0, rst_n = 0, hit = 0;
  logic laser_trig, ts_valid, drop;
  logic [31:0] ts;
  realtime t_laser = 0;
  int expq [$];
  int nwrap = 0, ndrop = 0, nts = 0;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always #1.25 clk400 = ~clk400;
  always #5 clk100 = ~clk100;
  tdc dut (.*);
  initial begin
    repeat (400000) @(posedge clk400);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge laser_trig) t_laser = $realtime;
  always @(posedge clk400) if (rst_n && drop) ndrop++;
  always @(posedge clk100) if (rst_n && ts_valid) begin
    int e, d;
    e = expq.pop_front();
    d = int'(ts) - e;
    if (d > 2500) d -= 5000;
    if (d < -2500) d += 5000;
    check(d >= -1 && d <= 1, $sformatf("ts %0d expected %0d", ts, e));
    check(ts < 5000, "timestamp inside the laser period");
    nts++;
  end
  function automatic int expect_ts(realtime dt);
    int b;
    b = int'($ceil(dt / 0.020 - 1e-6));
    return ((b % 5000) + 5000) % 5000;
  endfunction
  task automatic pulse(realtime at_offset, bit record);
    realtime now;
    // wait until the requested offset after the latest laser edge
    now = $realtime - t_laser;
    if (at_offset <= now) at_offset += 100.0 * $ceil((now - at_offset) / 100.0 + 1e-9);
    #(at_offset - now);
    if (record) expq.push_back(expect_ts($realtime - t_laser));
    hit = 1;
    #4;
    hit = 0;
  endtask
  initial begin
    repeat (4) @(posedge clk100);
    rst_n = 1;
    @(posedge laser_trig);
    for (int n = 0; n < 300; n++) begin
      realtime off;
      case (n % 10)
        3: begin off = 99.0 + $urandom_range(0, 990) * 0.001; nwrap++; end
        7: off = 2.5 * $urandom_range(0, 39);   // exactly on a clock edge
        default: off = $urandom_range(0, 99999) * 0.001;
      endcase
      pulse(off, 1);
      if (n % 25 == 24) begin
        #11;
        hit = 1; #4; hit = 0;  // 15 ns after the previous hit: dropped
      end
      #(60 + $urandom_range(0, 50));
    end
    #200;
    check(expq.size() == 0 && nts == 300, $sformatf("%0d timestamps received", nts));
    check(ndrop == 12, $sformatf("%0d drops expected 12", ndrop));
    $display("timestamps %0d wraps %0d drops %0d", nts, nwrap, ndrop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
