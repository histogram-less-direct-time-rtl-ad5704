`timescale 1ns/1ps
// Histogram-less direct time-of-flight ranging system.
//
// A SPAD pulse is timestamped by the TDC against the laser trigger and the
// timestamps of one depth-dot are collected in the 512 x 32 bit event
// memory. When the memory is full the LSTM accelerator wakes up, runs the
// LSTM over the 512 timestamps in arrival order and outputs the phase of
// the returned pulse (Q6.10, 0..1 of the full-scale range), then signals
// the host and the system is ready for the next depth-dot. No histogram is
// ever built. The host drives start, reads depth on done, and can load new
// weights at any time through the weight DMA stream.
//
// Clocks: clk400 (TDL sampling, coarse counter, laser trigger, drop
// counter) and clk100 (everything else), rising edges aligned.
// The host link and the clock generator are vendor parts outside this
// module; their signals are plain ports here.
module dtof_top
  import dtof_pkg::*;
#(
  parameter int  TAPS             = 128,
  parameter real TAP_NS           = 0.020,
  parameter int  BINS_PER_CLK     = 125,
  parameter int  LASER_PERIOD_CLK = 40,
  parameter int  N_EVENTS         = EVENTS,
  parameter int  XMUL             = 13422,
  parameter int  XSHIFT           = 16
) (
  input  logic        clk400,
  input  logic        clk100,
  input  logic        rst_n,
  // SPAD and laser
  input  logic        spad_hit,
  output logic        laser_trig,
  // host
  input  logic        host_start,
  output logic        host_done,
  output logic        busy,
  output q_t          depth,
  output logic        accel_sleep,
  output logic [15:0] dropped,
  // copy of every timestamp stored in the event memory, so the host can
  // run a histogram-based estimate on the same data for comparison
  output logic        ts_store,
  output logic [8:0]  ts_addr,
  output logic [31:0] ts_data,
  // weight DMA stream from the host
  input  logic        dma_restart,
  input  logic        dma_valid,
  input  logic [31:0] dma_data,
  output logic        dma_ready,
  output logic        dma_loaded
);

  localparam int EA = $clog2(N_EVENTS);
  localparam int RA = $clog2(WROWS);

  logic            ts_valid, drop;
  logic [TS_W-1:0] ts;
  logic            ev_we;
  logic [EA-1:0]   ev_waddr, ev_raddr;
  logic [TS_W-1:0] ev_rdata;
  logic            accel_start, accel_done;
  logic            wm_we, wm_re;
  logic [RA-1:0]   wm_waddr, wm_raddr;
  logic [WROW_W-1:0] wm_wdata, wm_rdata;

  tdc #(
    .TAPS(TAPS), .TAP_NS(TAP_NS), .BINS_PER_CLK(BINS_PER_CLK),
    .LASER_PERIOD_CLK(LASER_PERIOD_CLK), .TS_W(TS_W)
  ) u_tdc (
    .clk400, .clk100, .rst_n,
    .hit(spad_hit), .laser_trig, .ts_valid, .ts, .drop
  );

  assign ts_store = ev_we;
  assign ts_addr  = 9'(ev_waddr);
  assign ts_data  = ts;

  always_ff @(posedge clk400 or negedge rst_n) begin
    if (!rst_n)                  dropped <= '0;
    else if (drop && dropped != '1) dropped <= dropped + 1'b1;
  end

  host_fsm #(.EVENTS(N_EVENTS)) u_fsm (
    .clk(clk100), .rst_n,
    .start(host_start), .ts_valid,
    .ev_we, .ev_waddr,
    .accel_start, .accel_done,
    .done(host_done), .busy
  );

  event_memory #(.DEPTH(N_EVENTS), .W(TS_W)) u_evmem (
    .clk(clk100), .we(ev_we), .waddr(ev_waddr), .wdata(ts),
    .raddr(ev_raddr), .rdata(ev_rdata)
  );

  weight_dma u_dma (
    .clk(clk100), .rst_n,
    .restart(dma_restart), .in_valid(dma_valid), .in_data(dma_data), .ready(dma_ready),
    .wm_we, .wm_addr(wm_waddr), .wm_wdata, .loaded(dma_loaded)
  );

  weight_memory u_wmem (
    .clk(clk100),
    .we(wm_we), .waddr(wm_waddr), .wdata(wm_wdata),
    .re(wm_re), .raddr(wm_raddr), .rdata(wm_rdata)
  );

  lstm_accel #(.N_EVENTS(N_EVENTS), .XMUL(XMUL), .XSHIFT(XSHIFT)) u_accel (
    .clk(clk100), .rst_n,
    .start(accel_start),
    .ev_raddr, .ev_rdata,
    .wm_re, .wm_raddr, .wm_rdata,
    .y(depth), .done(accel_done), .sleep(accel_sleep)
  );

endmodule
