`timescale 1ns/1ps
// Clock-domain crossing of timestamps from the 400 MHz TDC domain to the
// 100 MHz system domain.
//
// Toggle handshake: on in_valid the fast side stores the word in a holding
// register and toggles req; a two-flop synchronizer carries req to the slow
// side, which copies the (by then stable) word, raises out_valid for one
// slow cycle and returns the toggle as ack through another two-flop
// synchronizer. Until ack matches req the fast side is busy, and a
// timestamp arriving then is not stored: drop pulses instead, so losses can
// be counted. A transfer takes about three slow cycles plus three fast
// ones (under 40 ns), shorter than a SPAD dead time. The document names
// a CDC synchronizer; the handshake and the drop rule are this design's.
module cdc_sync #(
  parameter int W = 32
) (
  input  logic         clk_fast,
  input  logic         clk_slow,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  output logic         drop
);

  logic [W-1:0] hold;
  logic req, ack_s1, ack_s2;
  logic req_s1, req_s2, req_s3;
  logic busy;

  assign busy = (req != ack_s2);

  // fast side
  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) begin
      hold   <= '0;
      req    <= 1'b0;
      ack_s1 <= 1'b0;
      ack_s2 <= 1'b0;
      drop   <= 1'b0;
    end else begin
      ack_s1 <= req_s3;
      ack_s2 <= ack_s1;
      drop   <= in_valid && busy;
      if (in_valid && !busy) begin
        hold <= in_data;
        req  <= !req;
      end
    end
  end

  // slow side
  always_ff @(posedge clk_slow or negedge rst_n) begin
    if (!rst_n) begin
      req_s1    <= 1'b0;
      req_s2    <= 1'b0;
      req_s3    <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      req_s1    <= req;
      req_s2    <= req_s1;
      req_s3    <= req_s2;
      out_valid <= (req_s2 != req_s3);
      if (req_s2 != req_s3) out_data <= hold;
    end
  end

endmodule
