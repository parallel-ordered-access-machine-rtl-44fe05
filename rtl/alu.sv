// alu: one arithmetic-logic unit of the ordered-access machine.
//
// Each ALU has one instruction input, two data inputs and one result output,
// as the document describes for its example. It performs the operations the
// document's example program uses: mul, add, sub (a - b), tr (pass operand a
// on unchanged so that it reaches a later stage under a new index) and nop.
// Arithmetic is two's complement and wraps at DW bits; the product keeps the
// low DW bits. These number-format choices are this design's own: the
// document only calls the operands binary numbers.
//
// An operand may be absent (the memory had no item at that position). An
// instruction whose operands are missing (a for tr; a and b for the others)
// produces no result and raises operand_err for one cycle instead.
//
// Timing: one cycle. Inputs are sampled when in_valid is high; res_valid and
// res follow on the next cycle. A nop, or an idle cycle, gives res_valid low.
module alu
  import poam_pkg::*;
#(
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  op_t           op,
  input  logic          a_present,
  input  logic [DW-1:0] a,
  input  logic          b_present,
  input  logic [DW-1:0] b,
  output logic          res_valid,
  output logic [DW-1:0] res,
  output logic          operand_err
);

  logic          need_b, ops_ok, produce;
  logic [DW-1:0] result;

  always_comb begin
    need_b = (op == OP_ADD) || (op == OP_SUB) || (op == OP_MUL);
    ops_ok = a_present && (b_present || !need_b);
    unique case (op)
      OP_TR:   result = a;
      OP_ADD:  result = a + b;
      OP_SUB:  result = a - b;
      OP_MUL:  result = a * b;
      default: result = '0;
    endcase
    produce = in_valid && (op != OP_NOP) && ops_ok;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid   <= 1'b0;
      operand_err <= 1'b0;
      res         <= '0;
    end else begin
      res_valid   <= produce;
      operand_err <= in_valid && (op != OP_NOP) && !ops_ok;
      if (produce) res <= result;
    end
  end

endmodule
