`timescale 1ns/1ps
// Time-to-digital converter: timestamps each SPAD pulse against the laser.
//
// Fine time: the pulse runs into the tapped delay line; the taps are
// sampled twice at 400 MHz and the pipelined T2B encoder turns the sample
// that caught the edge into fine = taps passed since the pulse, i.e. the
// time from the pulse to the sampling edge in TDL bins.
// Coarse time: a 400 MHz counter wraps every LASER_PERIOD_CLK cycles and
// fires laser_trig when it passes zero; its value is carried through a
// pipeline matched to the sampler and encoder latency (four cycles).
// Timestamp = coarse * BINS_PER_CLK - fine, modulo one laser period, in
// TDL bins since the laser trigger edge (0 .. LASER_PERIOD_CLK*BINS_PER_CLK-1).
// BINS_PER_CLK is the delay-line calibration: bins per 2.5 ns.
// The timestamp then crosses into the 100 MHz domain (cdc_sync), where
// ts_valid pulses for one cycle.
// The delay line, double sampling, T2B and CDC follow the document; the
// coarse counter, laser trigger and timestamp format are this design's.
module tdc #(
  parameter int  TAPS             = 128,
  parameter real TAP_NS           = 0.020,
  parameter int  BINS_PER_CLK     = 125,
  parameter int  LASER_PERIOD_CLK = 40,
  parameter int  TS_W             = 32
) (
  input  logic            clk400,
  input  logic            clk100,
  input  logic            rst_n,
  input  logic            hit,
  output logic            laser_trig,
  output logic            ts_valid,
  output logic [TS_W-1:0] ts,
  output logic            drop
);

  localparam int CW  = $clog2(LASER_PERIOD_CLK);
  localparam int FW  = $clog2(TAPS + 1);
  localparam int FSR = LASER_PERIOD_CLK * BINS_PER_CLK;

  logic [TAPS-1:0] taps, therm;
  logic            enc_hit;
  logic [FW-1:0]   fine;
  logic [CW-1:0]   cnt, cnt_n;
  logic [CW-1:0]   cpipe [4];
  logic            ts_f_valid;
  logic [TS_W-1:0] ts_f;
  int              t_bins;

  tdl_chain #(.TAPS(TAPS), .TAP_NS(TAP_NS)) u_tdl (.hit, .taps);
  tdl_sampler #(.TAPS(TAPS)) u_smp (.clk(clk400), .rst_n, .taps, .therm);
  t2b_encoder #(.TAPS(TAPS)) u_t2b (.clk(clk400), .rst_n, .therm, .hit(enc_hit), .fine);

  assign cnt_n = (int'(cnt) == LASER_PERIOD_CLK - 1) ? '0 : cnt + 1'b1;

  always_comb begin
    t_bins = int'(cpipe[3]) * BINS_PER_CLK - int'(fine);
    if (t_bins < 0) t_bins += FSR;
  end

  always_ff @(posedge clk400 or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      laser_trig <= 1'b0;
      for (int k = 0; k < 4; k++) cpipe[k] <= '0;
      ts_f_valid <= 1'b0;
      ts_f       <= '0;
    end else begin
      cnt        <= cnt_n;
      laser_trig <= (cnt_n == '0);
      cpipe[0]   <= cnt_n;
      for (int k = 1; k < 4; k++) cpipe[k] <= cpipe[k-1];
      ts_f_valid <= enc_hit;
      if (enc_hit) ts_f <= TS_W'(t_bins);
    end
  end

  cdc_sync #(.W(TS_W)) u_cdc (
    .clk_fast(clk400), .clk_slow(clk100), .rst_n,
    .in_valid(ts_f_valid), .in_data(ts_f),
    .out_valid(ts_valid), .out_data(ts), .drop
  );

endmodule
