// tb_alu: self-checking test of one ALU.
//
// Drives random operations and operands, including absent operands and
// idle cycles, and compares the registered result one cycle later with a
// reference computed here with 32-bit wrap-around arithmetic. Also checks
// the one-cycle latency: the result must appear exactly in the next cycle.
module tb_alu;
  import poam_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid, a_present, b_present;
  op_t           op;
  logic [31:0]   a, b;
  logic          res_valid, operand_err;
  logic [31:0]   res;

  alu #(.DW(32)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic        exp_v, exp_e;
    logic [31:0] exp_r;
    in_valid = 0; a_present = 0; b_present = 0; op = OP_NOP; a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 7) != 0);
      op        = op_t'($urandom_range(0, 4));
      a         = $urandom;
      b         = $urandom;
      a_present = ($urandom_range(0, 9) != 0);
      b_present = ($urandom_range(0, 9) != 0);
      unique case (op)
        OP_TR:  begin exp_r = a;     exp_v = a_present;              end
        OP_ADD: begin exp_r = a + b; exp_v = a_present && b_present; end
        OP_SUB: begin exp_r = a - b; exp_v = a_present && b_present; end
        OP_MUL: begin exp_r = 32'(longint'(a) * longint'(b)); exp_v = a_present && b_present; end
        default: begin exp_r = '0;   exp_v = 1'b0;                   end
      endcase
      exp_e = in_valid && (op != OP_NOP) && !exp_v;
      exp_v = exp_v && in_valid && (op != OP_NOP);
      @(posedge clk); #1;
      check(res_valid == exp_v, $sformatf("valid op=%s", op.name()));
      check(operand_err == exp_e, $sformatf("operand_err op=%s", op.name()));
      if (exp_v) check(res == exp_r, $sformatf("op=%s a=%h b=%h got %h exp %h", op.name(), a, b, res, exp_r));
    end
    // a few fixed cases
    @(negedge clk); in_valid = 1; op = OP_SUB; a = 5; b = 7; a_present = 1; b_present = 1;
    @(posedge clk); #1; check(res_valid && res == 32'hFFFF_FFFE, "5-7 wraps to -2");
    @(negedge clk); op = OP_MUL; a = 32'h0001_0000; b = 32'h0001_0003;
    @(posedge clk); #1; check(res_valid && res == 32'h0003_0000, "product keeps low 32 bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
