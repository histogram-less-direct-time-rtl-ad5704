`timescale 1ns/1ps
// Processing element (PE) of the LSTM accelerator.
//
// Each PE owns one row of every matrix-vector product (row-stationary data
// flow) and one element of every LSTM vector. It has one 16x16 multiplier,
// one 28-bit adder and one activation table, each preceded by a
// multiplexer, plus its own ten activation registers in two sub-banks.
// The multiplexers let the same three operators run the matrix-vector
// multiply-accumulates of Eqs. 1-4 (weight times x_t or times a broadcast
// element of h_{t-1}), the element-wise products and sums of Eqs. 5-6 and
// the activations.
//
// Interface: every cycle the controller broadcasts one micro-operation
// (uop) to all PEs; w is this PE's 16-bit lane of the weight-memory row read
// for that uop, x the scaled timestamp and hb the broadcast hidden element.
// A uop completes in one cycle: acc and the registers change at the next
// rising edge. en = 0 freezes the PE (sleep). h is the saturated
// accumulator, taken by the hidden memory on an OP_HWR.
//
// The operators and multiplexers follow the document; the operation set
// and the fixed-point truncation are this design's.
module pe
  import dtof_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  uop_t uop,
  input  q_t   w,
  input  q_t   x,
  input  q_t   hb,
  output acc_t acc,
  output q_t   h
);

  acc_t qa, qb;
  q_t   mul_a, mul_b;
  acc_t prod;
  acc_t add_a;
  acc_t sum;
  acc_t act_in;
  q_t   act_out;
  logic rf_we, rf_bank;
  logic [2:0] rf_addr;
  acc_t rf_wdata;
  logic rf_clr;

  activation_regs u_regs (
    .clk, .rst_n,
    .clr  (rf_clr),
    .we   (rf_we),
    .wbank(rf_bank),
    .waddr(rf_addr),
    .wdata(rf_wdata),
    .ra   (uop.ra),
    .rb   (uop.rb),
    .qa, .qb
  );

  activation_lut u_act (
    .x      (act_in),
    .sigmoid(uop.sig),
    .y      (act_out)
  );

  // operand multiplexers
  always_comb begin
    unique case (uop.op)
      OP_MACX:            begin mul_a = w;         mul_b = x;         end
      OP_MACH:            begin mul_a = w;         mul_b = hb;        end
      OP_MULRR, OP_MACRR: begin mul_a = sat16(qa); mul_b = sat16(qb); end
      OP_MULWA:           begin mul_a = w;         mul_b = sat16(qa); end
      default:            begin mul_a = '0;        mul_b = '0;        end
    endcase
    prod   = qmul(mul_a, mul_b);
    add_a  = (uop.op == OP_MACX || uop.op == OP_MACH || uop.op == OP_MACRR) ? acc : '0;
    sum    = add_a + prod;
    act_in = uop.asrc ? qb : acc;
    h      = sat16(acc);
  end

  // register-file write port
  always_comb begin
    rf_clr   = en && uop.op == OP_CLR;
    rf_we    = 1'b0;
    rf_bank  = uop.dbank;
    rf_addr  = uop.dst;
    rf_wdata = acc;
    if (en) begin
      unique case (uop.op)
        OP_ACT: begin rf_we = 1'b1; rf_wdata = acc_t'(act_out); end
        OP_STB: begin rf_we = 1'b1; rf_wdata = acc; end
        OP_HWR: begin rf_we = 1'b1; rf_bank = 1'b0; rf_addr = REG_H; rf_wdata = acc_t'(h); end
        default: ;
      endcase
    end
  end

  // accumulator
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (en) begin
      unique case (uop.op)
        OP_CLR:                                  acc <= '0;
        OP_LDB:                                  acc <= acc_t'(w);
        OP_MACX, OP_MACH, OP_MULRR, OP_MACRR,
        OP_MULWA:                                acc <= sum;
        default: ;
      endcase
    end
  end

endmodule
