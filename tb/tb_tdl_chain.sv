`timescale 1ns/1ps
// Testbench of the delay-line model: after a rising edge of hit, at time d
// later exactly floor(d / 20 ps) low taps are high (a thermometer code);
// after the falling edge the ones drain the same way.
module tb_tdl_chain;
  logic hit = 0;
  logic [127:0] taps;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  tdl_chain dut (.hit, .taps);
  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 40; n++) begin
      int d_ps, k;
      d_ps = int'($urandom_range(5, 2700));
      #10;
      hit = 1;
      #(d_ps * 0.001);
      k = (d_ps / 20 > 128) ? 128 : d_ps / 20;
      if (d_ps % 20 != 0)
        check(taps == ((k == 128) ? '1 : ((128'(1) << k) - 1)), $sformatf("%0d ps: taps=%h", d_ps, taps));
      #5;
      check(taps == '1, "all taps high");
      hit = 0;
      #(d_ps * 0.001);
      if (d_ps % 20 != 0)
        check(taps == ((k == 128) ? '0 : ~((128'(1) << k) - 1)), $sformatf("falling %0d ps", d_ps));
      #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
