// tb_data_poam: self-checking test of the data memory.
//
// With the machine idle it loads operand items (columns 0..5) and result-
// index items (columns 6..8) from outside and reads rows back from outside,
// checking that operands and indices come out on their own outputs in index
// order. With run high it checks that outside writes are ignored and flagged,
// that write-back items are stored, and that the sequencer's read request
// wins over the outside one.
module tb_data_poam;
  import poam_pkg::*;

  localparam int unsigned N = 3, P = 128, DW = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              clear, run;
  logic [N-1:0]      ext_wr_valid, wb_valid;
  poam_idx_t         ext_wr_idx [N], wb_idx [N];
  logic [DW-1:0]     ext_wr_data [N], wb_data [N];
  logic              ext_wr_ignored;
  logic              seq_rd_en, ext_rd_en;
  stage_t            seq_rd_stage, ext_rd_stage;
  row_t              seq_rd_row, ext_rd_row;
  logic              row_valid;
  logic [2*N-1:0]    opnd_present;
  logic [DW-1:0]     opnd [2*N];
  logic [N-1:0]      ridx_present;
  poam_idx_t         ridx [N];
  logic [$clog2(P+1)-1:0] fill;
  logic              full, overflow;

  data_poam #(.N(N), .P(P), .DW(DW)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] ref_data [int];

  task automatic idle_inputs();
    clear = 0; ext_wr_valid = '0; wb_valid = '0; seq_rd_en = 0; ext_rd_en = 0;
    seq_rd_stage = '0; seq_rd_row = '0; ext_rd_stage = '0; ext_rd_row = '0;
    for (int c = 0; c < N; c++) begin
      ext_wr_idx[c] = '0; ext_wr_data[c] = '0; wb_idx[c] = '0; wb_data[c] = '0;
    end
  endtask

  function automatic poam_idx_t mk(int s, int r, int c);
    return '{stage: stage_t'(s), row: row_t'(r), col: col_t'(c)};
  endfunction

  // Compare the row now on the outputs with the reference for (s, r).
  task automatic compare_row(input int s, input int r, input string tag);
    check(row_valid, {tag, ": row_valid"});
    for (int k = 0; k < 2*N; k++) begin
      int key;
      key = int'(mk(s, r, k));
      check(opnd_present[k] == ref_data.exists(key), $sformatf("%s: opnd %0d present", tag, k));
      if (ref_data.exists(key) && opnd_present[k])
        check(opnd[k] == ref_data[key], $sformatf("%s: opnd %0d value", tag, k));
    end
    for (int c = 0; c < N; c++) begin
      int key;
      key = int'(mk(s, r, 2*N + c));
      check(ridx_present[c] == ref_data.exists(key), $sformatf("%s: ridx %0d present", tag, c));
      if (ref_data.exists(key) && ridx_present[c])
        check(ridx[c] == poam_idx_t'(ref_data[key][IDX_W-1:0]), $sformatf("%s: ridx %0d value", tag, c));
    end
  endtask

  initial begin
    idle_inputs();
    run = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // load from outside: stage 0..1, rows 0..3, random columns of 9
    for (int cyc = 0; cyc < 20; cyc++) begin
      @(negedge clk);
      idle_inputs();
      for (int c = 0; c < N; c++) begin
        poam_idx_t ix;
        ix = mk($urandom_range(0, 1), $urandom_range(0, 3), $urandom_range(0, 3*N-1));
        if (!ref_data.exists(int'(ix))) begin
          ext_wr_valid[c] = 1;
          ext_wr_idx[c]   = ix;
          // index columns carry an index as their item
          ext_wr_data[c]  = (ix.col >= 2*N) ? DW'(mk($urandom_range(0, 15), $urandom_range(0, 15), $urandom_range(0, 8)))
                                            : DW'($urandom);
          ref_data[int'(ix)] = ext_wr_data[c];
        end
      end
    end
    @(negedge clk);
    idle_inputs();
    check(!ext_wr_ignored, "no load ignored while idle");
    for (int s = 0; s < 2; s++)
      for (int r = 0; r < 4; r++) begin
        @(negedge clk);
        idle_inputs();
        ext_rd_en = 1; ext_rd_stage = stage_t'(s); ext_rd_row = row_t'(r);
        seq_rd_en = 1; seq_rd_stage = 4'd7; seq_rd_row = 4'd7;   // ignored while idle
        @(posedge clk); #1;
        compare_row(s, r, $sformatf("idle read s%0d r%0d", s, r));
      end

    // running: outside writes ignored, write-back stored
    @(negedge clk);
    idle_inputs();
    run = 1;
    ext_wr_valid = '1;
    for (int c = 0; c < N; c++) begin ext_wr_idx[c] = mk(3, 0, c); ext_wr_data[c] = 32'hDEAD; end
    #1 check(ext_wr_ignored, "outside write flagged while running");
    for (int c = 0; c < N; c++) begin
      wb_valid[c] = (c != 1);
      wb_idx[c]   = mk(2, 1, 2*c + 1);
      wb_data[c]  = 32'(1000 + c);
      if (c != 1) ref_data[int'(wb_idx[c])] = wb_data[c];
    end
    @(negedge clk);
    idle_inputs();
    seq_rd_en = 1; seq_rd_stage = 4'd2; seq_rd_row = 4'd1;
    ext_rd_en = 1; ext_rd_stage = 4'd0; ext_rd_row = 4'd0;   // ignored while running
    @(posedge clk); #1;
    compare_row(2, 1, "write-back row");
    @(negedge clk);
    idle_inputs();
    seq_rd_en = 1; seq_rd_stage = 4'd3; seq_rd_row = 4'd0;
    @(posedge clk); #1;
    check(opnd_present == '0 && ridx_present == '0, "ignored outside write not stored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
