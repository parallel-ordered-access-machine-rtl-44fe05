// tb_poam_machine: end-to-end test of the ordered-access machine running
// the RGB-to-YUV conversion, at the machine's default size (3 ALUs).
//
//   Y = KYR*R + KYG*G + KYB*B
//   U = KUG*G - KUR*R + KUB*B + C1
//   V = KVR*R + KVG*G + KVB*B + C1
//
// The program is the four-stage labelled flow graph of this conversion:
// 9 mul in stage 0, add/sub and transfers in stages 1 to 3, 10 steps in all.
// It is written below as one table entry per ALU operation: its stage, step
// (row) and ALU, its opcode and the position (row, column, counted from 1 as
// in the labelled graph) its result takes in the next stage's operand
// matrix. From the table the testbench derives the instruction items, the
// result-index items (column 6 + ALU of the same row) and the initial
// operand items (stage 0) and loads them in a shuffled order: the memories,
// not the loader, put them in order.
//
// For several random pixels and coefficient sets it clears, loads, starts,
// checks the run time (10 steps + 2 drain cycles per stage + 1 = 19 cycles),
// reads the final matrix (stage 4, row 0) and compares Y, U, V with values
// computed here. It counts the machine's mechanisms and fails if one never
// occurred: end-of-stage drain stalls, transfers, empty instruction positions
// (nop), empty operand positions, a load refused while running, and memory
// overflow (provoked at the end by loading without clearing).
module tb_poam_machine;
  import poam_pkg::*;

  localparam int unsigned N = 3, DW = 32;

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

  // mechanism counters
  int n_drain = 0, n_stage = 0, n_tr = 0, n_mul = 0, n_add = 0, n_sub = 0;
  int n_ni = 0, n_nd = 0, n_ignored = 0, n_overflow = 0, n_dropped = 0, n_operr = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------------
  // The program. Names of the initial operands.
  // ---------------------------------------------------------------------
  typedef enum int {KYR, KYG, KYB, KUR, KUG, KUB, KVR, KVG, KVB, RR, GG, BB, C1} name_t;

  typedef struct {
    int  stage;   // 0..3
    int  row;     // step, from 1
    int  alu;     // 0..2
    op_t op;
    int  drow;    // result position in the next stage, from 1
    int  dcol;
  } pop_t;

  localparam int NOPS = 27;
  pop_t prog [NOPS];

  typedef struct { int row; int col; name_t nm; } init_t;
  localparam int NINIT = 20;
  init_t init [NINIT];

  initial begin
    // stage 0: products, and C1 carried on
    prog[0]  = '{0, 1, 0, OP_MUL, 1, 1};  // KYR*R
    prog[1]  = '{0, 1, 1, OP_MUL, 1, 2};  // KYG*G
    prog[2]  = '{0, 1, 2, OP_MUL, 2, 1};  // KYB*B
    prog[3]  = '{0, 2, 0, OP_MUL, 1, 3};  // KUG*G
    prog[4]  = '{0, 2, 1, OP_MUL, 1, 4};  // KUR*R
    prog[5]  = '{0, 2, 2, OP_MUL, 2, 3};  // KUB*B
    prog[6]  = '{0, 3, 0, OP_MUL, 1, 5};  // KVR*R
    prog[7]  = '{0, 3, 1, OP_MUL, 1, 6};  // KVG*G
    prog[8]  = '{0, 3, 2, OP_MUL, 3, 3};  // KVB*B
    prog[9]  = '{0, 4, 0, OP_TR,  2, 5};  // C1 (for U)
    prog[10] = '{0, 4, 1, OP_TR,  3, 1};  // C1 (for V)
    // stage 1
    prog[11] = '{1, 1, 0, OP_ADD, 1, 1};  // KYR*R + KYG*G
    prog[12] = '{1, 1, 1, OP_SUB, 1, 3};  // KUG*G - KUR*R
    prog[13] = '{1, 1, 2, OP_ADD, 1, 5};  // KVR*R + KVG*G
    prog[14] = '{1, 2, 0, OP_TR,  1, 2};  // KYB*B
    prog[15] = '{1, 2, 1, OP_TR,  1, 4};  // KUB*B
    prog[16] = '{1, 2, 2, OP_TR,  2, 1};  // C1
    prog[17] = '{1, 3, 0, OP_TR,  2, 3};  // C1
    prog[18] = '{1, 3, 1, OP_TR,  1, 6};  // KVB*B
    // stage 2
    prog[19] = '{2, 1, 0, OP_ADD, 1, 1};  // Y
    prog[20] = '{2, 1, 1, OP_ADD, 1, 3};  // U without C1
    prog[21] = '{2, 1, 2, OP_ADD, 1, 5};  // V without C1
    prog[22] = '{2, 2, 0, OP_TR,  1, 4};  // C1
    prog[23] = '{2, 2, 1, OP_TR,  1, 6};  // C1
    // stage 3: final matrix row 1 = Y U V
    prog[24] = '{3, 1, 0, OP_TR,  1, 1};
    prog[25] = '{3, 1, 1, OP_ADD, 1, 2};
    prog[26] = '{3, 1, 2, OP_ADD, 1, 3};

    init[0]  = '{1, 1, KYR}; init[1]  = '{1, 2, RR}; init[2]  = '{1, 3, KYG}; init[3]  = '{1, 4, GG};
    init[4]  = '{1, 5, KYB}; init[5]  = '{1, 6, BB};
    init[6]  = '{2, 1, KUG}; init[7]  = '{2, 2, GG}; init[8]  = '{2, 3, KUR}; init[9]  = '{2, 4, RR};
    init[10] = '{2, 5, KUB}; init[11] = '{2, 6, BB};
    init[12] = '{3, 1, KVR}; init[13] = '{3, 2, RR}; init[14] = '{3, 3, KVG}; init[15] = '{3, 4, GG};
    init[16] = '{3, 5, KVB}; init[17] = '{3, 6, BB};
    init[18] = '{4, 1, C1};  init[19] = '{4, 3, C1};
  end

  function automatic poam_idx_t pos(int s, int r1, int c1);   // from-1 row/column
    return '{stage: stage_t'(s), row: row_t'(r1 - 1), col: col_t'(c1 - 1)};
  endfunction

  // ---------------------------------------------------------------------
  // Mechanism monitors
  // ---------------------------------------------------------------------
  always @(posedge clk) if (rst_n) begin
    if (stall) n_drain++;
    if (stage_done) n_stage++;
    if (load_ignored) n_ignored++;
    n_ni      += $countones(instr_absent);
    n_dropped += $countones(result_dropped);
    n_operr   += $countones(operand_err);
    if (busy && dut.dm_row_valid) begin
      n_nd += (2*N) - $countones(dut.opnd_present);
      for (int c = 0; c < N; c++) begin
        if (dut.row_op[c] == OP_TR)  n_tr++;
        if (dut.row_op[c] == OP_MUL) n_mul++;
        if (dut.row_op[c] == OP_ADD) n_add++;
        if (dut.row_op[c] == OP_SUB) n_sub++;
      end
    end
  end

  // ---------------------------------------------------------------------
  // Loading
  // ---------------------------------------------------------------------
  typedef struct { poam_idx_t ix; logic [DW-1:0] d; } item_t;

  task automatic idle_inputs();
    clear = 0; dm_wr_valid = '0; im_wr_valid = '0; start = 0; rd_en = 0;
    rd_stage = '0; rd_row = '0;
    for (int c = 0; c < N; c++) begin
      dm_wr_idx[c] = '0; dm_wr_data[c] = '0; im_wr_idx[c] = '0; im_wr_op[c] = OP_NOP;
    end
  endtask

  task automatic load_program(input logic [DW-1:0] val [13]);
    item_t dq [$];
    item_t iq [$];
    foreach (init[i])
      dq.push_back('{pos(0, init[i].row, init[i].col), val[init[i].nm]});
    foreach (prog[i]) begin
      // result index item: same stage and row, index column 2N + ALU
      dq.push_back('{pos(prog[i].stage, prog[i].row, 2*N + prog[i].alu + 1),
                     DW'(pos(prog[i].stage + 1, prog[i].drow, prog[i].dcol))});
      iq.push_back('{pos(prog[i].stage, prog[i].row, prog[i].alu + 1), DW'(prog[i].op)});
    end
    dq.shuffle();
    iq.shuffle();
    while (dq.size() > 0 || iq.size() > 0) begin
      @(negedge clk);
      idle_inputs();
      for (int c = 0; c < N; c++) begin
        if (dq.size() > 0 && $urandom_range(0, 4) != 0) begin
          item_t it;
          it = dq.pop_front();
          dm_wr_valid[c] = 1; dm_wr_idx[c] = it.ix; dm_wr_data[c] = it.d;
        end
        if (iq.size() > 0 && $urandom_range(0, 4) != 0) begin
          item_t it;
          it = iq.pop_front();
          im_wr_valid[c] = 1; im_wr_idx[c] = it.ix; im_wr_op[c] = op_t'(it.d[OP_W-1:0]);
        end
      end
    end
    @(negedge clk);
    idle_inputs();
  endtask

  // ---------------------------------------------------------------------
  // Test
  // ---------------------------------------------------------------------
  initial begin
    logic [DW-1:0] val [13];
    logic [DW-1:0] ey, eu, ev;
    int cyc;

    idle_inputs();
    num_stages = 4'd4;
    for (int s = 0; s < MAX_STAGES; s++) steps[s] = '0;
    steps[0] = 5'd4; steps[1] = 5'd3; steps[2] = 5'd2; steps[3] = 5'd1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int px = 0; px < 6; px++) begin
      @(negedge clk);
      idle_inputs();
      clear = 1;
      @(negedge clk);
      idle_inputs();
      for (int k = 0; k < 13; k++) val[k] = DW'($urandom_range(0, 511)) - 32'd128;
      if (px == 0) begin
        // a BT.601-like integer set (coefficients scaled by 256)
        val[KYR] = 77;  val[KYG] = 150; val[KYB] = 29;
        val[KUR] = 43;  val[KUG] = -32'd85; val[KUB] = 128;
        val[KVR] = 128; val[KVG] = -32'd107; val[KVB] = -32'd21;
        val[RR] = 200; val[GG] = 100; val[BB] = 50; val[C1] = 128 << 8;
      end
      load_program(val);
      check(dm_fill == 8'd47, $sformatf("data memory holds %0d items, expected 47", dm_fill));
      check(im_fill == 7'd27, $sformatf("instruction memory holds %0d items, expected 27", im_fill));

      // run
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 200) begin
        if (px == 1 && cyc == 5) begin   // a load while running must be refused
          dm_wr_valid = 3'b001; dm_wr_idx[0] = pos(9, 1, 1); dm_wr_data[0] = 32'h5;
        end else dm_wr_valid = '0;
        @(negedge clk);
        cyc++;
      end
      dm_wr_valid = '0;
      check(cyc == 19, $sformatf("pixel %0d: run took %0d cycles, expected 19", px, cyc));
      // 47 loaded + 24 intermediate + 3 final items
      check(dm_fill == 8'd74, $sformatf("pixel %0d: %0d items after run, expected 74", px, dm_fill));

      // read the final matrix
      ey = val[KYR] * val[RR] + val[KYG] * val[GG] + val[KYB] * val[BB];
      eu = val[KUG] * val[GG] - val[KUR] * val[RR] + val[KUB] * val[BB] + val[C1];
      ev = val[KVR] * val[RR] + val[KVG] * val[GG] + val[KVB] * val[BB] + val[C1];
      rd_en = 1; rd_stage = 4'd4; rd_row = 4'd0;
      @(negedge clk);
      rd_en = 0;
      check(rd_valid, "final row read");
      check(rd_present == 6'b000111, $sformatf("pixel %0d: final row layout %b", px, rd_present));
      check(rd_data[0] == ey, $sformatf("pixel %0d: Y %0d exp %0d", px, $signed(rd_data[0]), $signed(ey)));
      check(rd_data[1] == eu, $sformatf("pixel %0d: U %0d exp %0d", px, $signed(rd_data[1]), $signed(eu)));
      check(rd_data[2] == ev, $sformatf("pixel %0d: V %0d exp %0d", px, $signed(rd_data[2]), $signed(ev)));
      if (px == 0) $display("pixel 0: Y=%0d U=%0d V=%0d", $signed(rd_data[0]), $signed(rd_data[1]), $signed(rd_data[2]));
      check(!dm_overflow && !im_overflow, "no overflow in a normal run");
    end

    // overflow: load again without clearing until the data memory is full
    begin
      logic [DW-1:0] v2 [13];
      for (int k = 0; k < 13; k++) v2[k] = 32'(k);
      load_program(v2);   // 74 + 47 = 121 of 128 used
      check(!dm_overflow, "121 items fit");
      load_program(v2);   // 47 more cannot fit
      check(dm_full && dm_overflow, $sformatf("data memory overflow (fill %0d)", dm_fill));
      n_overflow += dm_overflow ? 1 : 0;
    end

    // mechanism coverage
    $display("mechanisms: drain=%0d stages=%0d tr=%0d mul=%0d add=%0d sub=%0d ni=%0d nd=%0d refused=%0d overflow=%0d dropped=%0d operand_err=%0d",
             n_drain, n_stage, n_tr, n_mul, n_add, n_sub, n_ni, n_nd, n_ignored, n_overflow, n_dropped, n_operr);
    check(n_drain == 6 * 8, "drain cycles: 2 per stage, 4 stages, 6 runs");
    check(n_stage == 6 * 4, "stage completions");
    check(n_tr  == 6 * 10, "transfers executed");
    check(n_mul == 6 * 9,  "products executed");
    check(n_add == 6 * 7,  "additions executed");
    check(n_sub == 6 * 1,  "subtractions executed");
    check(n_ni  == 6 * 3,  "empty instruction positions issued as nop");
    check(n_nd > 0,        "empty operand positions seen");
    check(n_ignored > 0,   "load refused while running");
    check(n_overflow > 0,  "overflow");
    check(n_dropped == 0 && n_operr == 0, "no dropped result, no missing operand");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
