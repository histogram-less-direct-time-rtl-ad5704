`timescale 1ns/1ps
// Event memory: DEPTH x W bits holding the photon timestamps of one
// depth-dot (512 x 32 bits in the document). The TDC path writes one
// timestamp per write cycle at the system clock; the LSTM accelerator reads
// them back in order through a synchronous read port (data one cycle after
// the address), as a simple dual-port block RAM.
module event_memory #(
  parameter int DEPTH = 512,
  parameter int W     = 32
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
