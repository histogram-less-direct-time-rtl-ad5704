`timescale 1ns/1ps
// Hidden-state memory: holds h_t, one Q6.10 element per PE.
//
// On we, all PEs write their own element in the same cycle (the new h_t).
// On the read side one element, h[rsel], is broadcast to every PE, which is
// how the row-stationary matrix-vector product W_h * h_{t-1} is fed: in
// cycle j every PE multiplies its own W_h[row][j] by the common h[j]. clr
// sets h_0 = 0 at the start of a depth-dot. Writes take effect at the rising
// edge; the broadcast read is combinational. The broadcast scheme is this
// design's reading of the document's row-stationary data flow.
module hidden_memory
  import dtof_pkg::*;
#(
  parameter int N = NPE
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 we,
  input  q_t                   wdata [N],
  input  logic [$clog2(N)-1:0] rsel,
  output q_t                   bcast
);

  q_t mem [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) mem[k] <= '0;
    end else if (clr) begin
      for (int k = 0; k < N; k++) mem[k] <= '0;
    end else if (we) begin
      for (int k = 0; k < N; k++) mem[k] <= wdata[k];
    end
  end

  assign bcast = mem[rsel];

endmodule
