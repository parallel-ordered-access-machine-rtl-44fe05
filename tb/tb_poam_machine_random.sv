// tb_poam_machine_random: random staged programs on the default machine.
//
// Each trial builds a random program the way a program for this machine is
// prepared. Stage 0 gets random operands at random positions. For every ALU
// slot of every step the generator picks an instruction that fits the
// operands present: add, sub or mul when both are there, tr when only the
// first is, nop otherwise. Every result gets a random free position in the
// next stage's operand matrix. That position becomes the slot's result-index
// item. The testbench evaluates the program itself while building it, loads
// all items in shuffled order, runs the machine, and compares every position
// of the final matrix (present or absent, and value) with its own result. It
// also checks the run time T + 2*S + 1 cycles and the memory fill.
module tb_poam_machine_random;
  import poam_pkg::*;

  localparam int N = 3, DW = 32, C = 2 * N, MAXR = 4, MAXS = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 clear;
  logic [N-1:0]         dm_wr_valid, im_wr_valid;
  poam_idx_t            dm_wr_idx [N], im_wr_idx [N];
  logic [DW-1:0]        dm_wr_data [N];
  op_t                  im_wr_op [N];
  logic                 start;
  logic [IDX_STAGE_W-1:0] num_stages;
  logic [IDX_ROW_W:0]   steps [MAX_STAGES];
  logic                 busy, stall, done, stage_done;
  logic                 rd_en, rd_valid;
  stage_t               rd_stage;
  row_t                 rd_row;
  logic [2*N-1:0]       rd_present;
  logic [DW-1:0]        rd_data [2*N];
  logic [7:0]           dm_fill;
  logic [6:0]           im_fill;
  logic                 dm_full, im_full, dm_overflow, im_overflow, load_ignored;
  logic [N-1:0]         operand_err, result_dropped, instr_absent;

  poam_machine dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // error pulses seen during any run
  int n_err = 0;
  always @(posedge clk) if (rst_n)
    n_err += $countones(operand_err) + $countones(result_dropped) + int'(dm_overflow) + int'(im_overflow);

  // operand matrices of all stages, as the program generator sees them
  logic          have [MAXS+1][MAXR][C];
  logic [DW-1:0] val  [MAXS+1][MAXR][C];
  int            rows [MAXS+1];

  typedef struct { poam_idx_t ix; logic [DW-1:0] d; } item_t;

  task automatic idle_inputs();
    clear = 0; dm_wr_valid = '0; im_wr_valid = '0; start = 0; rd_en = 0;
    rd_stage = '0; rd_row = '0;
    for (int c = 0; c < N; c++) begin
      dm_wr_idx[c] = '0; dm_wr_data[c] = '0; im_wr_idx[c] = '0; im_wr_op[c] = OP_NOP;
    end
  endtask

  function automatic poam_idx_t mk(int s, int r, int c);
    return '{stage: stage_t'(s), row: row_t'(r), col: col_t'(c)};
  endfunction

  initial begin
    idle_inputs();
    num_stages = '0;
    for (int s = 0; s < MAX_STAGES; s++) steps[s] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int trial = 0; trial < 40; trial++) begin
      item_t dq [$];
      item_t iq [$];
      int ns, total_steps, n_items, cyc;
      dq.delete(); iq.delete();
      ns = $urandom_range(1, MAXS);
      for (int s = 0; s <= MAXS; s++)
        for (int r = 0; r < MAXR; r++)
          for (int k = 0; k < C; k++) begin have[s][r][k] = 0; val[s][r][k] = '0; end

      // stage 0 operands
      rows[0] = $urandom_range(1, 2);
      for (int r = 0; r < rows[0]; r++)
        for (int k = 0; k < C; k++)
          if ($urandom_range(0, 4) != 0) begin
            have[0][r][k] = 1;
            val[0][r][k]  = $urandom;
            dq.push_back('{mk(0, r, k), val[0][r][k]});
          end

      total_steps = 0;
      for (int s = 0; s < ns; s++) begin
        int nres, free_pos [$];
        op_t           op  [MAXR][N];
        logic [DW-1:0] res [MAXR][N];
        free_pos.delete();
        // pick instructions and compute results
        nres = 0;
        for (int r = 0; r < rows[s]; r++)
          for (int c = 0; c < N; c++) begin
            logic a_ok, b_ok;
            logic [DW-1:0] a, b;
            a_ok = have[s][r][2*c]; b_ok = have[s][r][2*c+1];
            a = val[s][r][2*c];     b = val[s][r][2*c+1];
            if (a_ok && b_ok)  op[r][c] = op_t'($urandom_range(1, 4));
            else if (a_ok)     op[r][c] = OP_TR;
            else               op[r][c] = OP_NOP;
            unique case (op[r][c])
              OP_TR:   res[r][c] = a;
              OP_ADD:  res[r][c] = a + b;
              OP_SUB:  res[r][c] = a - b;
              OP_MUL:  res[r][c] = a * b;
              default: res[r][c] = '0;
            endcase
            if (op[r][c] != OP_NOP) nres++;
          end
        // size of the next operand matrix and random placement of results
        rows[s+1] = (nres + C - 1) / C + $urandom_range(0, 1);
        if (rows[s+1] > MAXR) rows[s+1] = MAXR;
        if (rows[s+1] < 1) rows[s+1] = 1;
        for (int p = 0; p < rows[s+1] * C; p++) free_pos.push_back(p);
        free_pos.shuffle();
        for (int r = 0; r < rows[s]; r++)
          for (int c = 0; c < N; c++)
            if (op[r][c] != OP_NOP) begin
              int p;
              p = free_pos.pop_front();
              have[s+1][p / C][p % C] = 1;
              val [s+1][p / C][p % C] = res[r][c];
              iq.push_back('{mk(s, r, c), DW'(op[r][c])});
              dq.push_back('{mk(s, r, C + c), DW'(mk(s + 1, p / C, p % C))});
            end
        steps[s] = (IDX_ROW_W+1)'(rows[s]);
        total_steps += rows[s];
      end
      for (int s = ns; s < MAX_STAGES; s++) steps[s] = '0;
      num_stages = IDX_STAGE_W'(ns);

      // clear and load in shuffled order
      @(negedge clk);
      idle_inputs();
      clear = 1;
      n_items = dq.size();
      dq.shuffle();
      iq.shuffle();
      while (dq.size() > 0 || iq.size() > 0) begin
        @(negedge clk);
        idle_inputs();
        for (int c = 0; c < N; c++) begin
          if (dq.size() > 0 && $urandom_range(0, 3) != 0) begin
            item_t it;
            it = dq.pop_front();
            dm_wr_valid[c] = 1; dm_wr_idx[c] = it.ix; dm_wr_data[c] = it.d;
          end
          if (iq.size() > 0 && $urandom_range(0, 3) != 0) begin
            item_t it;
            it = iq.pop_front();
            im_wr_valid[c] = 1; im_wr_idx[c] = it.ix; im_wr_op[c] = op_t'(it.d[OP_W-1:0]);
          end
        end
      end
      @(negedge clk);
      idle_inputs();
      check(int'(dm_fill) == n_items, $sformatf("trial %0d: fill %0d, loaded %0d", trial, dm_fill, n_items));

      // run
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 300) begin
        @(negedge clk);
        cyc++;
      end
      check(cyc == total_steps + 2 * ns + 1,
            $sformatf("trial %0d: %0d cycles, expected %0d", trial, cyc, total_steps + 2 * ns + 1));
      check(n_err == 0, $sformatf("trial %0d: %0d error pulses (missing operand, dropped result, overflow)", trial, n_err));

      // compare the final matrix
      for (int r = 0; r < rows[ns]; r++) begin
        rd_en = 1; rd_stage = stage_t'(ns); rd_row = row_t'(r);
        @(negedge clk);
        rd_en = 0;
        for (int k = 0; k < C; k++) begin
          check(rd_present[k] == have[ns][r][k], $sformatf("trial %0d: final (%0d,%0d) presence", trial, r, k));
          if (have[ns][r][k] && rd_present[k])
            check(rd_data[k] == val[ns][r][k], $sformatf("trial %0d: final (%0d,%0d) = %h exp %h",
                  trial, r, k, rd_data[k], val[ns][r][k]));
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
