`timescale 1ns/1ps
// Testbench of the weight DMA: streams 4 * 42 random words with random
// gaps, checks each row write (address, packing), that ready drops and
// loaded rises after the last row, and that restart starts over.
module tb_weight_dma;
  logic clk = 0, rst_n = 0, restart = 0, in_valid = 0;
  logic [31:0] in_data = 0;
  logic ready, wm_we, loaded;
  logic [5:0] wm_addr;
  logic [127:0] wm_wdata;
  logic [127:0] rows [42];
  int nrow = 0;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always #5 clk = ~clk;
  weight_dma dut (.*);
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n && wm_we) begin
    check(int'(wm_addr) == nrow % 42, $sformatf("row address %0d expected %0d", wm_addr, nrow % 42));
    check(wm_wdata == rows[wm_addr], $sformatf("row %0d data", wm_addr));
    nrow++;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int r = 0; r < 42; r++) begin
        rows[r] = {$urandom, $urandom, $urandom, $urandom};
        for (int j = 0; j < 4; j++) begin
          @(negedge clk);
          check(ready, "ready while loading");
          in_valid = 1; in_data = rows[r][32*j +: 32];
          @(negedge clk);
          in_valid = 0;
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
      end
      repeat (2) @(negedge clk);
      check(loaded && !ready, "loaded after 42 rows");
      check(nrow == 42 * (pass + 1), $sformatf("%0d rows written", nrow));
      in_valid = 1; in_data = 32'hdead;
      @(negedge clk);
      in_valid = 0;
      check(nrow == 42 * (pass + 1), "no write after loaded");
      restart = 1;
      @(negedge clk);
      restart = 0;
      #1;
      check(!loaded && ready, "restart");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
