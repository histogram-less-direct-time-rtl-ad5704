`timescale 1ns/1ps
// Testbench of the activation table: sweeps the argument over [-10, 10)
// and compares tanh and sigmoid with $tanh and 1/(1+$exp(-x)). The table
// truncates its argument to steps of 1/32 (1/16 for the sigmoid), so the
// allowed error is the function's change over one step plus one LSB.
module tb_activation_lut;
  import dtof_pkg::*;
  acc_t x;
  logic sig;
  q_t   y;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  activation_lut dut (.x, .sigmoid(sig), .y);

  initial begin
    #(1000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int maxerr = 0;
    for (int v = -10240; v < 10240; v += 7) begin
      for (int s = 0; s < 2; s++) begin
        real xr, lo, hi, yr, step, r0, r1;
        x = acc_t'(v);
        sig = s[0];
        #0.001;
        xr = v / 1024.0;
        step = s ? 1.0 / 16.0 : 1.0 / 32.0;
        if (s) begin
          r0 = 1.0 / (1.0 + $exp(-(xr - step)));
          r1 = 1.0 / (1.0 + $exp(-xr));
        end else begin
          r0 = $tanh(xr - step);
          r1 = $tanh(xr);
        end
        // clamped region: table ends at +-4 (tanh) / +-8 (sigmoid)
        lo = r0 * 1024.0 - 1.5;
        hi = r1 * 1024.0 + 1.5;
        if (s && xr >= 8.0)  lo = 1024.0 / (1.0 + $exp(-8.0)) - 2.0;
        if (!s && xr >= 4.0) lo = $tanh(4.0) * 1024.0 - 2.0;
        if (s && xr < -8.0)  hi = 1024.0 / (1.0 + $exp(8.0)) + 2.0;
        if (!s && xr < -4.0) hi = $tanh(-4.0) * 1024.0 + 2.0;
        yr = real'(y);
        check(yr >= lo && yr <= hi, $sformatf("%s(%f) = %0d not in [%f, %f]", s ? "sigmoid" : "tanh", xr, y, lo, hi));
      end
    end
    // exact points
    x = 0; sig = 0; #0.001; check(y == 0, "tanh(0)");
    x = 0; sig = 1; #0.001; check(y == 512, "sigmoid(0)");
    x = acc_t'(1024); sig = 0; #0.001; check(y == q_t'(780), $sformatf("tanh(1)=%0d", y));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
