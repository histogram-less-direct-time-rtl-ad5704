`timescale 1ns/1ps
// Pipelined thermometer-to-binary (T2B) encoder at 400 MHz.
//
// Counts the ones of the sampled thermometer code: stage 1 counts the ones
// of each GROUP-bit slice, stage 2 adds the slice counts. A ones counter
// rather than a priority encoder tolerates bubbles (isolated wrong bits
// near the edge position). The same pipeline flags a new hit: the first tap
// is high in this sample and was low in the previous one, so only the
// sample that caught the edge in flight is reported. fine is the number of
// taps the edge passed before the sampling clock edge.
// Latency: two clock cycles from therm to hit/fine. The document gives a
// pipelined T2B; the ones-counter structure and hit flag are this design's.
module t2b_encoder #(
  parameter int TAPS  = 128,
  parameter int GROUP = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [TAPS-1:0]           therm,
  output logic                      hit,
  output logic [$clog2(TAPS+1)-1:0] fine
);

  localparam int NG = (TAPS + GROUP - 1) / GROUP;
  localparam int GW = $clog2(GROUP + 1);
  localparam int FW = $clog2(TAPS + 1);

  logic [NG*GROUP-1:0] padded;
  logic [GW-1:0] gcnt_n [NG];
  logic [GW-1:0] gcnt   [NG];
  logic          first_d, hit1;
  logic [FW-1:0] total;

  assign padded = (NG*GROUP)'(therm);

  always_comb begin
    for (int g = 0; g < NG; g++) begin
      gcnt_n[g] = '0;
      for (int b = 0; b < GROUP; b++) gcnt_n[g] += GW'(padded[g*GROUP + b]);
    end
    total = '0;
    for (int g = 0; g < NG; g++) total += FW'(gcnt[g]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < NG; g++) gcnt[g] <= '0;
      first_d <= 1'b0;
      hit1    <= 1'b0;
      hit     <= 1'b0;
      fine    <= '0;
    end else begin
      gcnt    <= gcnt_n;
      first_d <= therm[0];
      hit1    <= therm[0] && !first_d;
      hit     <= hit1;
      fine    <= total;
    end
  end

endmodule
