`timescale 1ns/1ps
// Testbench of one processing element: random operands run through every
// micro-operation (bias load, MACs with x and broadcast h, activations into
// both banks, register products, store, h write, FCN product, clear) and
// the accumulator, registers (via later products) and h are compared with
// integer arithmetic in the testbench. en = 0 must freeze the PE.
module tb_pe;
  import dtof_pkg::*;
  import lstm_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 1;
  uop_t uop = UOP_NOP;
  q_t   w = 0, x = 0, hb = 0;
  acc_t acc;
  q_t   h;
  acc_t m_acc;
  acc_t ra_m [5], rb_m [5];
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always #5 clk = ~clk;
  pe dut (.*);
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic acc_t pr(q_t a, q_t b);
    longint p;
    p = longint'(a) * longint'(b);
    return acc_t'(p >>> 10);
  endfunction

  task automatic issue(op_e op, q_t wv = 0, logic sg = 0, logic as = 0,
                       logic [2:0] a = 0, logic [2:0] b = 0, logic db = 0, logic [2:0] d = 0);
    acc_t nacc;
    acc_t av;
    @(negedge clk);
    uop = '{op: op, sig: sg, asrc: as, ra: a, rb: b, dbank: db, dst: d};
    w = wv;
    x  = q_t'($urandom_range(0, 1023));
    hb = q_t'(int'($urandom_range(0, 2047)) - 1024);
    nacc = m_acc;
    if (en) case (op)
      OP_CLR:   begin nacc = 0; for (int k = 0; k < 5; k++) begin ra_m[k] = 0; rb_m[k] = 0; end end
      OP_LDB:   nacc = acc_t'(wv);
      OP_MACX:  nacc = m_acc + pr(wv, x);
      OP_MACH:  nacc = m_acc + pr(wv, hb);
      OP_MULRR: nacc = pr(sat16(ra_m[a]), sat16(rb_m[b]));
      OP_MACRR: nacc = m_acc + pr(sat16(ra_m[a]), sat16(rb_m[b]));
      OP_MULWA: nacc = pr(wv, sat16(ra_m[a]));
      OP_ACT: begin
        av = as ? rb_m[b] : m_acc;
        if (db) rb_m[d] = acc_t'(ref_act(av, sg)); else ra_m[d] = acc_t'(ref_act(av, sg));
      end
      OP_STB: if (db) rb_m[d] = m_acc; else ra_m[d] = m_acc;
      OP_HWR: begin
        check(h == sat16(m_acc), "h output");
        ra_m[REG_H] = acc_t'(sat16(m_acc));
      end
      default: ;
    endcase
    m_acc = nacc;
    @(negedge clk);
    uop = UOP_NOP;
    check(acc == m_acc, $sformatf("%s: acc=%0d expected %0d", op.name(), acc, m_acc));
  endtask

  function automatic q_t rw(int r);
    return q_t'(int'($urandom_range(0, 2*r - 1)) - r);
  endfunction

  initial begin
    m_acc = 0;
    for (int k = 0; k < 5; k++) begin ra_m[k] = 0; rb_m[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      en = (n % 10 != 7);
      issue(OP_CLR);
      en = 1;
      // four gates: bias, W_x, 8 W_h MACs, activation
      for (int g = 0; g < 4; g++) begin
        issue(OP_LDB, rw(1024));
        en = (n % 10 != 3);
        issue(OP_MACX, rw(2048));
        en = 1;
        for (int j = 0; j < 8; j++) issue(OP_MACH, rw(1024));
        issue(OP_ACT, 0, g != 2, 0, 0, 0, g == 2, (g == 0) ? REG_F : (g == 1) ? REG_I : (g == 2) ? REG_CT : REG_O);
      end
      // element-wise
      issue(OP_MULRR, 0, 0, 0, REG_F, REG_C);
      issue(OP_MACRR, 0, 0, 0, REG_I, REG_CT);
      issue(OP_STB, 0, 0, 0, 0, 0, 1, REG_C);
      issue(OP_ACT, 0, 0, 1, 0, REG_C, 1, REG_TC);
      issue(OP_MULRR, 0, 0, 0, REG_O, REG_TC);
      issue(OP_HWR);
      issue(OP_MULWA, rw(1024), 0, 0, REG_H);
      issue(OP_MULRR, 0, 0, 0, REG_H, REG_C);
      // large values: saturation of register operands
      issue(OP_LDB, q_t'(32000));
      for (int j = 0; j < 4; j++) issue(OP_MACH, q_t'(32767));
      issue(OP_STB, 0, 0, 0, 0, 0, 1, 3'd3);
      issue(OP_STB, 0, 0, 0, 0, 0, 0, 3'd3);
      issue(OP_MULRR, 0, 0, 0, 3'd3, 3'd3);
      issue(OP_HWR);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
