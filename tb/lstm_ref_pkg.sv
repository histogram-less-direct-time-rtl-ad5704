`timescale 1ns/1ps
// Reference model of the fixed-point LSTM for the testbenches.
//
// Written from the LSTM equations (forget, input, candidate and output
// gates; c_t = f*c_{t-1} + i*c~; h_t = o*tanh(c_t); y = w_fc . h + b_fc)
// with the number formats of the accelerator: Q6.10 words, 28-bit
// accumulators, products truncated to 10 fraction bits, tanh from the
// 256-entry table over [-4, 4) and sigmoid(x) = (1 + tanh(x/2)) / 2.
// It works on whole vectors and knows nothing of the PE schedule.
package lstm_ref_pkg;
  import dtof_pkg::*;

  typedef struct {
    q_t b   [NGATE][NPE];
    q_t wx  [NGATE][NPE];
    q_t wh  [NGATE][NPE][NPE];  // [gate][row k][column j]
    q_t wfc [NPE];
    q_t bfc;
  } weights_t;

  function automatic q_t ref_act(acc_t a, bit sig);
    lut_t tab;
    longint v, idx;
    tab = tanh_table();
    v = sig ? (longint'(a) >>> 1) : longint'(a);
    idx = v >>> 5;
    if (idx > 127) idx = 127;
    if (idx < -128) idx = -128;
    if (sig) return q_t'((1024 + longint'(tab[8'(idx + 128)])) >>> 1);
    return tab[8'(idx + 128)];
  endfunction

  function automatic q_t ref_scale(longint ts, int xmul, int xshift);
    longint v;
    v = (ts * xmul) >>> xshift;
    return (v > 32767) ? q_t'(32767) : q_t'(v);
  endfunction

  // Runs the network over n timestamps and returns y.
  function automatic q_t ref_run(weights_t w, longint ts [], int n, int xmul, int xshift);
    q_t h [NPE], hn [NPE], g [NGATE][NPE];
    acc_t c [NPE];
    acc_t a;
    longint y;
    for (int k = 0; k < NPE; k++) begin h[k] = '0; c[k] = '0; end
    for (int t = 0; t < n; t++) begin
      q_t x;
      x = ref_scale(ts[t], xmul, xshift);
      for (int gi = 0; gi < NGATE; gi++)
        for (int k = 0; k < NPE; k++) begin
          a = acc_t'(w.b[gi][k]) + qmul(w.wx[gi][k], x);
          for (int j = 0; j < NPE; j++) a += qmul(w.wh[gi][k][j], h[j]);
          g[gi][k] = ref_act(a, gi != 2);
        end
      for (int k = 0; k < NPE; k++) begin
        c[k] = qmul(g[0][k], sat16(c[k])) + qmul(g[1][k], g[2][k]);
        hn[k] = sat16(qmul(g[3][k], ref_act(c[k], 1'b0)));
      end
      h = hn;
    end
    y = longint'(w.bfc);
    for (int k = 0; k < NPE; k++) y += longint'(qmul(w.wfc[k], h[k]));
    return (y > 32767) ? q_t'(32767) : (y < -32768) ? q_t'(-32768) : q_t'(y);
  endfunction

  // Random weights in [-R, R) in Q6.10.
  function automatic weights_t ref_random(int r);
    weights_t w;
    for (int gi = 0; gi < NGATE; gi++)
      for (int k = 0; k < NPE; k++) begin
        w.b[gi][k]  = q_t'(int'($urandom_range(0, 2*r - 1)) - r);
        w.wx[gi][k] = q_t'(int'($urandom_range(0, 8*r - 1)) - 4*r);
        for (int j = 0; j < NPE; j++)
          w.wh[gi][k][j] = q_t'(int'($urandom_range(0, 2*r - 1)) - r);
      end
    for (int k = 0; k < NPE; k++) w.wfc[k] = q_t'(int'($urandom_range(0, 2*r - 1)) - r);
    w.bfc = q_t'(512);
    return w;
  endfunction

  // Weight-memory row r of the layout used by the accelerator.
  function automatic logic [WROW_W-1:0] ref_row(weights_t w, int r);
    logic [WROW_W-1:0] row;
    row = '0;
    for (int k = 0; k < NPE; k++) begin
      q_t v;
      if (r < ROW_FC_W) begin
        int gi, s;
        gi = r / GATE_ROWS;
        s  = r % GATE_ROWS;
        v = (s == 0) ? w.b[gi][k] : (s == 1) ? w.wx[gi][k] : w.wh[gi][k][s-2];
      end else if (r == ROW_FC_W) begin
        v = w.wfc[k];
      end else begin
        v = (k == 0) ? w.bfc : '0;
      end
      row[k*DW +: DW] = v;
    end
    return row;
  endfunction
endpackage
