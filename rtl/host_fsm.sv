`timescale 1ns/1ps
// System state machine, driven by the host.
//
//   IDLE    -- start -->  ACQUIRE: every timestamp from the TDC is written
//                         to the event memory at the next free address
//   ACQUIRE -- memory full (EVENTS timestamps) -->  PROCESS: accel_start
//                         pulses once; the accelerator leaves sleep mode
//   PROCESS -- accel_done -->  DONE: done pulses to the host for one cycle
//   DONE    -->  IDLE, ready for the next depth-dot.
// Timestamps outside ACQUIRE are discarded. busy is high outside IDLE.
// The document gives the start/acquire/process/report sequence; the state
// encoding and the discard rule are this design's.
module host_fsm #(
  parameter int EVENTS = 512
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      ts_valid,
  output logic                      ev_we,
  output logic [$clog2(EVENTS)-1:0] ev_waddr,
  output logic                      accel_start,
  input  logic                      accel_done,
  output logic                      done,
  output logic                      busy
);

  typedef enum logic [1:0] {S_IDLE, S_ACQ, S_PROC, S_DONE} state_e;

  state_e state;
  logic [$clog2(EVENTS):0] cnt;

  assign ev_we    = (state == S_ACQ) && ts_valid;
  assign ev_waddr = cnt[$clog2(EVENTS)-1:0];
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cnt         <= '0;
      accel_start <= 1'b0;
      done        <= 1'b0;
    end else begin
      accel_start <= 1'b0;
      done        <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_ACQ;
          cnt   <= '0;
        end
        S_ACQ: if (ev_we) begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == EVENTS - 1) begin
            state       <= S_PROC;
            accel_start <= 1'b1;
          end
        end
        S_PROC: if (accel_done) begin
          state <= S_DONE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
