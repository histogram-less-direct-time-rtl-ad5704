`timescale 1ns/1ps
// Non-linear activation of a processing element: tanh or sigmoid of a
// 28-bit accumulator value with 10 fraction bits, result in Q6.10.
//
// One 256-entry table holds tanh over [-4, 4) in steps of 1/32; arguments
// outside that range clamp to the end entries. The sigmoid is taken from
// the same table through sigma(x) = (1 + tanh(x/2)) / 2: an input
// multiplexer halves the argument and an output multiplexer adds one and
// halves the result. The table is filled at elaboration from
// dtof_pkg::tanh_table(). The document names the activation LUTs; the
// table size, range and the shared table are this design's choice.
//
// Purely combinational.
module activation_lut
  import dtof_pkg::*;
(
  input  acc_t x,        // argument, 10 fraction bits
  input  logic sigmoid,  // 1: sigmoid, 0: tanh
  output q_t   y         // Q6.10 result
);

  localparam lut_t LUT = tanh_table();
  localparam int HALF = LUT_SIZE / 2;

  acc_t a;       // argument after the input multiplexer
  acc_t idx_s;   // signed table index before clamping
  logic [LUT_BITS-1:0] idx;
  q_t   t;

  always_comb begin
    a     = sigmoid ? (x >>> 1) : x;
    idx_s = a >>> LUT_STEP_SHIFT;
    if (idx_s >= acc_t'(HALF))       idx = LUT_BITS'(LUT_SIZE - 1);
    else if (idx_s < acc_t'(-HALF))  idx = '0;
    else                             idx = LUT_BITS'(idx_s + acc_t'(HALF));
    t = LUT[idx];
    y = sigmoid ? q_t'((17'sd1024 + 17'(t)) >>> 1) : t;
  end

endmodule
