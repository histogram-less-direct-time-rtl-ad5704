`timescale 1ns/1ps
// Behavioural model of the tapped delay line (TDL) of the TDC.
//
// In the FPGA the line is a chain of Carry4 carry-logic cells in adjacent
// slices; the SPAD pulse ripples along the carry chain and tap k rises
// (k+1) * TAP_NS after the pulse. The chain is a placed vendor primitive
// whose behaviour comes from its wire and cell delays, so it is modelled
// here with transport delays and is not synthesizable. 128 taps of 20 ps
// (2.56 ns) cover one period of the 400 MHz sampling clock; both numbers
// are this design's assumptions.
//
// Interface: hit (SPAD pulse) in, taps out. While an edge is travelling,
// taps is a thermometer code: taps[0..k] have seen it, the rest have not.
module tdl_chain #(
  parameter int  TAPS   = 128,
  parameter real TAP_NS = 0.020
) (
  input  logic            hit,
  output logic [TAPS-1:0] taps
);

  initial taps = '0;

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    always @(hit) taps[k] <= #(TAP_NS * (k + 1)) hit;
  end

endmodule
