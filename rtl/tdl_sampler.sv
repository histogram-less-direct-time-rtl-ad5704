`timescale 1ns/1ps
// Double sampling of the delay-line taps at 400 MHz.
//
// The first register stands for the flip-flops inside the Carry4 slices,
// the second for a rank placed freely by the place-and-route tool; the
// second rank gives a metastable first-rank bit a full period to settle
// before the thermometer code is encoded. Latency: the code sampled at one
// rising edge appears on therm after the next one. As the document gives.
module tdl_sampler #(
  parameter int TAPS = 128
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TAPS-1:0] taps,
  output logic [TAPS-1:0] therm
);

  logic [TAPS-1:0] stage1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage1 <= '0;
      therm  <= '0;
    end else begin
      stage1 <= taps;
      therm  <= stage1;
    end
  end

endmodule
