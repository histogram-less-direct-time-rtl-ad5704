`timescale 1ns/1ps
// Shared types and constants of the histogram-less dTOF system.
//
// Number formats: weights, inputs and hidden states are 16-bit Q6.10
// (6 integer bits including sign, 10 fraction bits). Accumulators and the
// per-PE activation registers are 28 bits wide with the same 10 fraction
// bits. The LSTM has a scalar input (one timestamp per step) and a hidden
// size of NPE = 8, one hidden unit per processing element.
//
// The package also holds the micro-operation that the LSTM controller
// broadcasts to all PEs and the function that builds the tanh table.
package dtof_pkg;

  localparam int NPE      = 8;    // processing elements = hidden units
  localparam int DW       = 16;   // Q6.10 data word
  localparam int AW       = 28;   // activation register / accumulator width
  localparam int FRAC     = 10;   // fraction bits
  localparam int EVENTS   = 512;  // timestamps per depth-dot
  localparam int TS_W     = 32;   // event-memory word
  localparam int WROWS    = 42;   // weight-memory rows
  localparam int WROW_W   = NPE * DW;  // 128-bit weight row
  localparam int NGATE    = 4;    // f, i, c~, o
  localparam int GATE_ROWS = 10;  // bias, W_x, 8 columns of W_h
  localparam int ROW_FC_W = NGATE * GATE_ROWS;      // 40: FCN weights
  localparam int ROW_FC_B = NGATE * GATE_ROWS + 1;  // 41: FCN bias (lane 0)

  // tanh table: 256 entries over [-4, 4), index = floor(x * 32) + 128
  localparam int LUT_BITS = 8;
  localparam int LUT_SIZE = 1 << LUT_BITS;
  localparam int LUT_STEP_SHIFT = FRAC - 5;  // x in Q.10 -> x*32

  typedef logic signed [DW-1:0] q_t;
  typedef logic signed [AW-1:0] acc_t;
  typedef q_t lut_t [LUT_SIZE];

  // PE operations
  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,
    OP_CLR   = 4'd1,   // acc <= 0, all activation registers <= 0
    OP_LDB   = 4'd2,   // acc <= w                 (bias)
    OP_MACX  = 4'd3,   // acc <= acc + w * x       (input weight)
    OP_MACH  = 4'd4,   // acc <= acc + w * hb      (recurrent weight, broadcast h)
    OP_ACT   = 4'd5,   // reg[dbank][dst] <= act(acc or B[rb])
    OP_MULRR = 4'd6,   // acc <= A[ra] * B[rb]
    OP_MACRR = 4'd7,   // acc <= acc + A[ra] * B[rb]
    OP_STB   = 4'd8,   // reg[dbank][dst] <= acc
    OP_HWR   = 4'd9,   // A[REG_H] <= sat(acc); hidden memory takes sat(acc)
    OP_MULWA = 4'd10   // acc <= w * A[ra]         (FCN product)
  } op_e;

  typedef struct packed {
    op_e        op;
    logic       sig;    // activation: 1 sigmoid, 0 tanh
    logic       asrc;   // activation source: 0 accumulator, 1 bank-B register rb
    logic [2:0] ra;     // bank-A read register
    logic [2:0] rb;     // bank-B read register
    logic       dbank;  // destination bank: 0 A, 1 B
    logic [2:0] dst;    // destination register
  } uop_t;

  localparam uop_t UOP_NOP = '{op: OP_NOP, default: '0};

  // Register map (two sub-banks of five 28-bit registers per PE)
  localparam logic [2:0] REG_F  = 3'd0;  // bank A: forget gate
  localparam logic [2:0] REG_I  = 3'd1;  // bank A: input gate
  localparam logic [2:0] REG_O  = 3'd2;  // bank A: output gate
  localparam logic [2:0] REG_H  = 3'd4;  // bank A: this PE's h_t
  localparam logic [2:0] REG_CT = 3'd0;  // bank B: candidate c~
  localparam logic [2:0] REG_C  = 3'd1;  // bank B: cell state c
  localparam logic [2:0] REG_TC = 3'd2;  // bank B: tanh(c)
  localparam int BANK_REGS = 5;

  // Saturate an accumulator value to a Q6.10 word.
  function automatic q_t sat16(acc_t v);
    if (v > acc_t'(32767))       return q_t'(32767);
    else if (v < acc_t'(-32768)) return q_t'(-32768);
    else                         return q_t'(v);
  endfunction

  // Fixed-point product of two Q6.10 words, truncated back to 10 fraction bits.
  function automatic acc_t qmul(q_t a, q_t b);
    logic signed [2*DW-1:0] p;
    p = a * b;
    return acc_t'(p >>> FRAC);
  endfunction

  // e^x by its power series (elaboration-time only).
  function automatic real rexp(real x);
    real s, t;
    s = 1.0;
    t = 1.0;
    for (int k = 1; k < 60; k++) begin
      t = t * x / k;
      s = s + t;
    end
    return s;
  endfunction

  // Table contents: entry k holds tanh((k - 128) / 32) rounded to Q6.10.
  function automatic lut_t tanh_table();
    lut_t tab;
    for (int k = 0; k < LUT_SIZE; k++) begin
      real x, e, y;
      x = (k - LUT_SIZE / 2) / 32.0;
      e = rexp(2.0 * x);
      y = (e - 1.0) / (e + 1.0) * 1024.0;
      tab[k] = q_t'($rtoi(y >= 0.0 ? y + 0.5 : y - 0.5));
    end
    return tab;
  endfunction

endpackage
