// tb_instr_poam: self-checking test of the instruction memory.
//
// Loads the instruction matrices of a small program with some positions left
// empty, then reads every row and checks that each ALU column carries the
// instruction written for it, and that empty positions come out as nop with
// the no-instruction flag set. Also checks that a write while running is
// ignored and flagged.
module tb_instr_poam;
  import poam_pkg::*;

  localparam int unsigned N = 3, P = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          clear, run;
  logic [N-1:0]  wr_valid;
  poam_idx_t     wr_idx [N];
  op_t           wr_op  [N];
  logic          wr_ignored;
  logic          rd_en;
  stage_t        rd_stage;
  row_t          rd_row;
  logic          row_valid;
  op_t           row_op [N];
  logic [N-1:0]  row_ni;
  logic [$clog2(P+1)-1:0] fill;
  logic          full, overflow;

  instr_poam #(.N(N), .P(P)) dut (.*);

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

  op_t ref_op [4][5][N];     // stage, row, column; OP_NOP = not written
  int  n_ni;

  initial begin
    clear = 0; run = 0; wr_valid = '0; rd_en = 0; rd_stage = '0; rd_row = '0;
    for (int c = 0; c < N; c++) begin wr_idx[c] = '0; wr_op[c] = OP_NOP; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // random program: each position holds an operation with probability 3/4,
    // written in a shuffled order
    begin
      int order [$];
      for (int s = 0; s < 4; s++)
        for (int r = 0; r < 5; r++)
          for (int c = 0; c < N; c++) begin
            ref_op[s][r][c] = ($urandom_range(0, 3) == 0) ? OP_NOP : op_t'($urandom_range(1, 4));
            if (ref_op[s][r][c] != OP_NOP) order.push_back((s * 5 + r) * N + c);
          end
      order.shuffle();
      while (order.size() > 0) begin
        @(negedge clk);
        wr_valid = '0;
        for (int j = 0; j < N && order.size() > 0; j++) begin
          int k;
          k = order.pop_front();
          wr_valid[j] = 1;
          wr_idx[j]   = '{stage: stage_t'(k / (5 * N)), row: row_t'((k / N) % 5), col: col_t'(k % N)};
          wr_op[j]    = ref_op[k / (5 * N)][(k / N) % 5][k % N];
        end
      end
      @(negedge clk);
      wr_valid = '0;
    end

    n_ni = 0;
    for (int s = 0; s < 4; s++)
      for (int r = 0; r < 5; r++) begin
        @(negedge clk);
        rd_en = 1; rd_stage = stage_t'(s); rd_row = row_t'(r);
        @(posedge clk); #1;
        check(row_valid, "row_valid");
        for (int c = 0; c < N; c++) begin
          check(row_op[c] == ref_op[s][r][c], $sformatf("s%0d r%0d c%0d op %s exp %s", s, r, c,
                row_op[c].name(), ref_op[s][r][c].name()));
          check(row_ni[c] == (ref_op[s][r][c] == OP_NOP), $sformatf("s%0d r%0d c%0d ni flag", s, r, c));
          if (row_ni[c]) n_ni++;
        end
      end
    check(n_ni > 0, "some positions held no instruction");
    @(negedge clk);
    rd_en = 0;
    run = 1; wr_valid = 3'b001; wr_idx[0] = '{stage: 4'd9, row: 4'd0, col: 4'd0}; wr_op[0] = OP_ADD;
    #1 check(wr_ignored, "write while running flagged");
    @(negedge clk);
    run = 0; wr_valid = '0;
    rd_en = 1; rd_stage = 4'd9; rd_row = 4'd0;
    @(posedge clk); #1;
    check(row_ni == 3'b111 && row_op[0] == OP_NOP, "write while running not stored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
