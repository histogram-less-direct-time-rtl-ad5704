`timescale 1ns/1ps
// LSTM accelerator: the machine-learning processor that turns the 512
// timestamps of one depth-dot into a distance estimate without a histogram.
//
// Eight processing elements (one per hidden unit) work in parallel under
// one controller; the weight memory feeds each PE its own 16-bit lane of
// every row, the hidden memory broadcasts one element of h_{t-1} per cycle,
// and the event memory supplies x_t. Each timestamp (a TDL bin count since
// the laser pulse) is scaled to a fraction of the full-scale range in Q6.10:
//   x_t = (ts * XMUL) >> XSHIFT,  XMUL = 2^XSHIFT * 1024 / FSR_BINS.
// After the last step the FCN stage outputs y (Q6.10, 0..1 of the range);
// distance = y * FSR is left to the host.
//
// Timing: start (one-cycle pulse) to done (one-cycle pulse, y valid) takes
// 3 + 50 * N_EVENTS + 2 cycles. Weight and event memories are outside,
// with one cycle of read latency. sleep is high while the PEs are idle and
// their clock enable is off.
module lstm_accel
  import dtof_pkg::*;
#(
  parameter int N_EVENTS = EVENTS,
  parameter int XMUL     = 13422,
  parameter int XSHIFT   = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  output logic [$clog2(N_EVENTS)-1:0] ev_raddr,
  input  logic [TS_W-1:0]             ev_rdata,
  output logic                        wm_re,
  output logic [$clog2(WROWS)-1:0]    wm_raddr,
  input  logic [WROW_W-1:0]           wm_rdata,
  output q_t                          y,
  output logic                        done,
  output logic                        sleep
);

  uop_t uop;
  logic [$clog2(NPE)-1:0] hsel;
  logic h_we, h_clr, fcn_go;
  q_t   x, hb;
  acc_t acc   [NPE];
  q_t   h_new [NPE];
  logic [TS_W+16:0] xprod;

  lstm_controller #(.N_EVENTS(N_EVENTS)) u_ctrl (
    .clk, .rst_n, .start,
    .ev_raddr, .wm_re, .wm_raddr,
    .uop, .hsel, .h_we, .h_clr, .fcn_go, .sleep
  );

  // input scaling: timestamp bins -> fraction of full-scale range
  always_comb begin
    xprod = (TS_W + 17)'(ev_rdata) * (TS_W + 17)'(XMUL);
    xprod = xprod >> XSHIFT;
    x = (xprod > (TS_W + 17)'(32767)) ? q_t'(32767) : q_t'(xprod);
  end

  for (genvar k = 0; k < NPE; k++) begin : g_pe
    pe u_pe (
      .clk, .rst_n,
      .en (!sleep),
      .uop,
      .w  (q_t'(wm_rdata[k*DW +: DW])),
      .x,
      .hb,
      .acc(acc[k]),
      .h  (h_new[k])
    );
  end

  hidden_memory u_hmem (
    .clk, .rst_n,
    .clr  (h_clr),
    .we   (h_we),
    .wdata(h_new),
    .rsel (hsel),
    .bcast(hb)
  );

  fcn_reduce u_fcn (
    .clk, .rst_n,
    .go     (fcn_go),
    .acc,
    .bias   (q_t'(wm_rdata[DW-1:0])),
    .y,
    .y_valid(done)
  );

endmodule
