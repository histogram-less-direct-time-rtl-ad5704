`timescale 1ns/1ps
// Weight memory: ROWS x (NPE*16) bits, one Q6.10 word per PE in every row
// (PE k uses bits [16k+15:16k]), so each PE has its own memory space and a
// single read feeds all PEs. Row layout for the LSTM (this design's):
//   rows 10g .. 10g+9, gate g = f, i, c~, o:  bias, W_x, W_h column 0..7
//   row 40: FCN weights, row 41: FCN bias in lane 0.
// One synchronous write port (from the weight DMA) and one synchronous read
// port with one cycle of latency, as a block RAM. If INIT_FILE is not empty
// the rows are preloaded from that hex file, one 128-bit row per line.
module weight_memory
  import dtof_pkg::*;
#(
  parameter int    ROWS      = WROWS,
  parameter int    W         = WROW_W,
  parameter string INIT_FILE = ""
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic [$clog2(ROWS)-1:0] waddr,
  input  logic [W-1:0]            wdata,
  input  logic                    re,
  input  logic [$clog2(ROWS)-1:0] raddr,
  output logic [W-1:0]            rdata
);

  logic [W-1:0] mem [ROWS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < ROWS) mem[waddr] <= wdata;
    if (re) rdata <= (int'(raddr) < ROWS) ? mem[raddr] : '0;
  end

endmodule
