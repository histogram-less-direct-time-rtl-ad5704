`timescale 1ns/1ps
// Weight DMA: loads the weight memory from a host word stream, so the
// network can be replaced on the fly.
//
// Words arrive on a valid/ready stream (ready stays high until every row is
// written). Four 32-bit words make one 128-bit row, lowest lanes first:
// word j of a row carries PE lanes 2j (bits 15:0) and 2j+1 (bits 31:16).
// Each completed row is written one cycle after its last word, to rows
// 0, 1, 2, ... in order; loaded goes high after the last row. restart
// returns to row 0. The document only says a simple DMA exists; the word
// packing and stream handshake are this design's.
module weight_dma
  import dtof_pkg::*;
#(
  parameter int ROWS   = WROWS,
  parameter int ROW_W  = WROW_W,
  parameter int WORD_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    restart,
  input  logic                    in_valid,
  input  logic [WORD_W-1:0]       in_data,
  output logic                    ready,
  output logic                    wm_we,
  output logic [$clog2(ROWS)-1:0] wm_addr,
  output logic [ROW_W-1:0]        wm_wdata,
  output logic                    loaded
);

  localparam int WPR = ROW_W / WORD_W;  // words per row

  logic [$clog2(WPR)-1:0]  wcnt;
  logic [$clog2(ROWS):0]   rcnt;
  logic [(WPR-1)*WORD_W-1:0] buffer;  // words 0..WPR-2 of the row

  assign loaded = (int'(rcnt) >= ROWS);
  assign ready  = !loaded && !restart;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt     <= '0;
      rcnt     <= '0;
      buffer   <= '0;
      wm_we    <= 1'b0;
      wm_addr  <= '0;
      wm_wdata <= '0;
    end else begin
      wm_we <= 1'b0;
      if (restart) begin
        wcnt <= '0;
        rcnt <= '0;
      end else if (in_valid && ready) begin
        if (int'(wcnt) == WPR - 1) begin
          wcnt     <= '0;
          wm_we    <= 1'b1;
          wm_addr  <= rcnt[$clog2(ROWS)-1:0];
          wm_wdata <= {in_data, buffer};
          rcnt     <= rcnt + 1'b1;
        end else begin
          buffer[int'(wcnt)*WORD_W +: WORD_W] <= in_data;
          wcnt <= wcnt + 1'b1;
        end
      end
    end
  end

endmodule
