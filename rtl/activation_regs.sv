`timescale 1ns/1ps
// Activation registers of one processing element: ten 28-bit registers
// split into two sub-banks of five (A and B), as the document gives.
// Each bank has its own read port, so an element-wise product of a bank-A
// value and a bank-B value (for example f_t * c_{t-1}) reads both operands
// in one cycle. One write port; clr zeroes all registers (c_0 = 0).
// Which quantity lives in which bank is this design's choice (see
// dtof_pkg register map). Writes take effect at the rising clock edge;
// reads are combinational.
module activation_regs
  import dtof_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       we,
  input  logic       wbank,   // 0: bank A, 1: bank B
  input  logic [2:0] waddr,
  input  acc_t       wdata,
  input  logic [2:0] ra,
  input  logic [2:0] rb,
  output acc_t       qa,
  output acc_t       qb
);

  acc_t bank_a [BANK_REGS];
  acc_t bank_b [BANK_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < BANK_REGS; k++) begin
        bank_a[k] <= '0;
        bank_b[k] <= '0;
      end
    end else if (clr) begin
      for (int k = 0; k < BANK_REGS; k++) begin
        bank_a[k] <= '0;
        bank_b[k] <= '0;
      end
    end else if (we && int'(waddr) < BANK_REGS) begin
      if (wbank) bank_b[waddr] <= wdata;
      else       bank_a[waddr] <= wdata;
    end
  end

  assign qa = (int'(ra) < BANK_REGS) ? bank_a[ra] : '0;
  assign qb = (int'(rb) < BANK_REGS) ? bank_b[rb] : '0;

endmodule
