`timescale 1ns/1ps
// LSTM controller: program counter and state machine of the accelerator.
//
// After start it clears the PE registers and h (h_0 = c_0 = 0), then for
// each of the EVENTS timestamps runs a fixed 50-cycle program:
//   for gate g in f, i, c~, o (PC phase 0, 11 steps each):
//     bias load, W_x * x_t, eight W_h[.][j] * h_{t-1}[j] MACs,
//     then sigmoid (tanh for c~) into the gate's activation register;
//   element-wise (PC phase 1, 6 steps):
//     acc = f*c; acc += i*c~; c = acc; tc = tanh(c); acc = o*tc; h = acc.
// After the last timestamp it issues the FCN product (w_fc * h) and then
// the FCN sum (fcn_go) with the FCN bias row.
//
// The PC is {phase, gate[1:0], step[3:0]}. The weight-memory row is formed
// from it by masking: row = 10*gate + step in phase 0; the FCN rows 40 and
// 41 follow. The micro-op and the hidden-memory controls are registered so
// that they reach the PEs in the same cycle as the block-RAM read data.
// The event-memory read address is the timestamp index t.
//
// The document states that a PC drives the state machine and, by masking,
// the weight address; the program and its timing are this design's.
module lstm_controller
  import dtof_pkg::*;
#(
  parameter int N_EVENTS = EVENTS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  output logic [$clog2(N_EVENTS)-1:0] ev_raddr,
  output logic                        wm_re,
  output logic [$clog2(WROWS)-1:0]    wm_raddr,
  output uop_t                        uop,      // aligned with weight data
  output logic [$clog2(NPE)-1:0]      hsel,     // aligned with uop
  output logic                        h_we,     // aligned with uop
  output logic                        h_clr,    // aligned with uop
  output logic                        fcn_go,   // aligned with uop
  output logic                        sleep
);

  typedef enum logic [2:0] {S_IDLE, S_CLR, S_RUN, S_FCN0, S_FCN1} state_e;

  state_e state;
  logic       phase;
  logic [1:0] gate;
  logic [3:0] step;
  logic [$clog2(N_EVENTS)-1:0] t;

  uop_t u_n;
  logic [$clog2(NPE)-1:0] hsel_n;
  logic h_we_n, h_clr_n, fcn_go_n;
  logic [5:0] row_n;

  localparam logic [2:0] GATE_DST [NGATE] = '{REG_F, REG_I, REG_CT, REG_O};

  // instruction decode of the current PC
  always_comb begin
    u_n      = UOP_NOP;
    hsel_n   = '0;
    h_we_n   = 1'b0;
    h_clr_n  = 1'b0;
    fcn_go_n = 1'b0;
    wm_re    = 1'b0;
    row_n    = '0;
    unique case (state)
      S_CLR: begin
        u_n.op  = OP_CLR;
        h_clr_n = 1'b1;
      end
      S_RUN: begin
        if (!phase) begin
          wm_re = (step < 4'd10);
          row_n = 6'(gate) * 6'(GATE_ROWS) + 6'(step & 4'hF);
          if (step == 4'd0)       u_n.op = OP_LDB;
          else if (step == 4'd1)  u_n.op = OP_MACX;
          else if (step < 4'd10) begin
            u_n.op = OP_MACH;
            hsel_n = $clog2(NPE)'(step - 4'd2);
          end else begin
            u_n.op    = OP_ACT;
            u_n.sig   = (gate != 2'd2);
            u_n.dbank = (gate == 2'd2);
            u_n.dst   = GATE_DST[gate];
          end
        end else begin
          unique case (step)
            4'd0: begin u_n.op = OP_MULRR; u_n.ra = REG_F; u_n.rb = REG_C;  end
            4'd1: begin u_n.op = OP_MACRR; u_n.ra = REG_I; u_n.rb = REG_CT; end
            4'd2: begin u_n.op = OP_STB;   u_n.dbank = 1'b1; u_n.dst = REG_C; end
            4'd3: begin
              u_n.op = OP_ACT; u_n.asrc = 1'b1; u_n.rb = REG_C; u_n.sig = 1'b0;
              u_n.dbank = 1'b1; u_n.dst = REG_TC;
            end
            4'd4: begin u_n.op = OP_MULRR; u_n.ra = REG_O; u_n.rb = REG_TC; end
            default: begin u_n.op = OP_HWR; h_we_n = 1'b1; end
          endcase
        end
      end
      S_FCN0: begin
        wm_re  = 1'b1;
        row_n  = 6'(ROW_FC_W);
        u_n.op = OP_MULWA;
        u_n.ra = REG_H;
      end
      S_FCN1: begin
        wm_re    = 1'b1;
        row_n    = 6'(ROW_FC_B);
        fcn_go_n = 1'b1;
      end
      default: ;
    endcase
    wm_raddr = row_n;
  end

  // program counter and state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      phase <= 1'b0;
      gate  <= '0;
      step  <= '0;
      t     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) state <= S_CLR;
        S_CLR: begin
          state <= S_RUN;
          phase <= 1'b0;
          gate  <= '0;
          step  <= '0;
          t     <= '0;
        end
        S_RUN: begin
          if (!phase) begin
            if (step == 4'd10) begin
              step <= '0;
              if (gate == 2'd3) begin
                gate  <= '0;
                phase <= 1'b1;
              end else begin
                gate <= gate + 2'd1;
              end
            end else begin
              step <= step + 4'd1;
            end
          end else begin
            if (step == 4'd5) begin
              step  <= '0;
              phase <= 1'b0;
              if (int'(t) == N_EVENTS - 1) state <= S_FCN0;
              else                          t <= t + 1'b1;
            end else begin
              step <= step + 4'd1;
            end
          end
        end
        S_FCN0: state <= S_FCN1;
        S_FCN1: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // pipeline register: micro-op meets the block-RAM data
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      uop    <= UOP_NOP;
      hsel   <= '0;
      h_we   <= 1'b0;
      h_clr  <= 1'b0;
      fcn_go <= 1'b0;
    end else begin
      uop    <= u_n;
      hsel   <= hsel_n;
      h_we   <= h_we_n;
      h_clr  <= h_clr_n;
      fcn_go <= fcn_go_n;
    end
  end

  assign ev_raddr = t;
  assign sleep    = (state == S_IDLE) && (uop.op == OP_NOP) && !fcn_go;

endmodule
