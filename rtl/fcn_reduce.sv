`timescale 1ns/1ps
// Output of the final fully connected layer (FCN): y = sum_k p_k + b.
//
// After the last timestamp each PE holds in its accumulator the product
// w_fc[k] * h[k] of its own hidden element and FCN weight. On go, an adder
// tree sums the NPE accumulators and the FCN bias (Q6.10) and the result,
// saturated to Q6.10, is registered: y and y_valid appear one cycle after
// go. y is the regression value, 0..1 of the full-scale range. The document
// describes the FCN's function only; the adder tree outside the PEs is this
// design's choice.
module fcn_reduce
  import dtof_pkg::*;
#(
  parameter int N = NPE
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  input  acc_t acc [N],
  input  q_t   bias,
  output q_t   y,
  output logic y_valid
);

  localparam int SW = AW + $clog2(N) + 1;
  typedef logic signed [SW-1:0] sum_t;

  sum_t total;
  always_comb begin
    total = sum_t'(bias);
    for (int k = 0; k < N; k++) total += sum_t'(acc[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= go;
      if (go) begin
        if (total > sum_t'(32767))       y <= q_t'(32767);
        else if (total < sum_t'(-32768)) y <= q_t'(-32768);
        else                             y <= q_t'(total);
      end
    end
  end

endmodule
