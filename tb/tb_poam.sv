// tb_poam: self-checking test of the parallel ordered-access memory.
//
// At the default size (64 locations, 8 write and 8 read ports, 32-bit items)
// it writes items in random order, a random number per cycle, each with a
// unique random index. It keeps a reference map from index to item. Every row
// of the written stages is then read back and compared column by column:
// present where an item was written with that index, absent elsewhere.
// It also checks the one-cycle read latency, a read issued right after a
// write, oldest-wins for a repeated index, the fill count, filling to the
// last location, the sticky overflow flag and clear. Finally it writes an
// 8x8 matrix row by row with transposed indices and reads back its transpose.
module tb_poam;
  import poam_pkg::*;

  localparam int unsigned P = 64, WP = 8, RP = 8, DW = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              clear;
  logic [WP-1:0]     wr_valid;
  poam_idx_t         wr_idx  [WP];
  logic [DW-1:0]     wr_data [WP];
  logic              rd_en;
  stage_t            rd_stage;
  row_t              rd_row;
  logic              rd_valid;
  logic [RP-1:0]     rd_present;
  logic [DW-1:0]     rd_data [RP];
  logic [$clog2(P+1)-1:0] fill;
  logic              full, overflow;

  poam #(.P(P), .WPORTS(WP), .RPORTS(RP), .DW(DW)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] ref_data [int];   // key: {stage,row,col}
  int            written;

  task automatic idle_inputs();
    clear = 0; wr_valid = '0; rd_en = 0; rd_stage = '0; rd_row = '0;
    for (int j = 0; j < WP; j++) begin wr_idx[j] = '0; wr_data[j] = '0; end
  endtask

  // Write up to `count` fresh items with indices in stages 0..1, rows 0..3.
  task automatic write_random(input int count);
    while (count > 0) begin
      @(negedge clk);
      idle_inputs();
      for (int j = 0; j < WP && count > 0; j++) begin
        if ($urandom_range(0, 3) != 0) begin
          poam_idx_t ix;
          do begin
            ix.stage = stage_t'($urandom_range(0, 1));
            ix.row   = row_t'($urandom_range(0, 3));
            ix.col   = col_t'($urandom_range(0, RP-1));
          end while (ref_data.exists(int'(ix)));
          wr_valid[j] = 1'b1;
          wr_idx[j]   = ix;
          wr_data[j]  = $urandom;
          ref_data[int'(ix)] = wr_data[j];
          count--;
          written++;
        end
      end
    end
    @(negedge clk);
    idle_inputs();
  endtask

  task automatic read_check(input int s, input int r);
    @(negedge clk);
    idle_inputs();
    rd_en = 1; rd_stage = stage_t'(s); rd_row = row_t'(r);
    @(posedge clk); #1;
    check(rd_valid, "rd_valid one cycle after rd_en");
    for (int t = 0; t < RP; t++) begin
      poam_idx_t ix;
      ix = '{stage: stage_t'(s), row: row_t'(r), col: col_t'(t)};
      check(rd_present[t] == ref_data.exists(int'(ix)),
            $sformatf("present s%0d r%0d c%0d", s, r, t));
      if (ref_data.exists(int'(ix)) && rd_present[t])
        check(rd_data[t] == ref_data[int'(ix)], $sformatf("data s%0d r%0d c%0d", s, r, t));
    end
    @(negedge clk);
    idle_inputs();
    @(posedge clk); #1;
    check(!rd_valid, "rd_valid drops");
  endtask

  initial begin
    idle_inputs();
    written = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // 1. random fill of 40 items, all rows read back in order
    write_random(40);
    check(fill == 40, $sformatf("fill after 40 writes = %0d", fill));
    check(!overflow && !full, "no overflow yet");
    for (int s = 0; s < 3; s++)
      for (int r = 0; r < 4; r++) read_check(s, r);

    // 2. write in one cycle, read in the next cycle
    @(negedge clk);
    idle_inputs();
    wr_valid[3] = 1; wr_idx[3] = '{stage: 4'd5, row: 4'd2, col: 4'd7}; wr_data[3] = 32'hCAFE_0001;
    ref_data[int'(wr_idx[3])] = wr_data[3];
    @(negedge clk);
    idle_inputs();
    rd_en = 1; rd_stage = 4'd5; rd_row = 4'd2;
    @(posedge clk); #1;
    check(rd_present == 8'h80 && rd_data[7] == 32'hCAFE_0001, "read right after write");

    // 3. repeated index: the first written item is returned
    @(negedge clk);
    idle_inputs();
    wr_valid[0] = 1; wr_idx[0] = '{stage: 4'd5, row: 4'd2, col: 4'd7}; wr_data[0] = 32'hBAD0_BAD0;
    @(negedge clk);
    idle_inputs();
    read_check(5, 2);
    check(fill == 42, "fill counts repeated index too");

    // 4. fill up to the last location, then overflow
    @(negedge clk);
    idle_inputs();
    for (int j = 0; j < WP; j++) begin
      wr_valid[j] = 1; wr_idx[j] = '{stage: 4'd9, row: 4'd0, col: col_t'(j)}; wr_data[j] = 32'(j + 100);
      ref_data[int'(wr_idx[j])] = wr_data[j];
    end
    @(negedge clk);
    idle_inputs();
    // 50 used: 14 more fit exactly
    for (int k = 0; k < 14; k++) begin
      @(negedge clk);
      idle_inputs();
      wr_valid[k % WP] = 1; wr_idx[k % WP] = '{stage: 4'd10, row: row_t'(k / RP), col: col_t'(k % RP)};
      wr_data[k % WP] = 32'(k + 200);
      ref_data[int'(wr_idx[k % WP])] = wr_data[k % WP];
    end
    @(negedge clk);
    idle_inputs();
    @(posedge clk); #1;
    check(full && fill == 64 && !overflow, "exactly full, no overflow");
    read_check(9, 0);
    read_check(10, 0);
    read_check(10, 1);
    @(negedge clk);
    idle_inputs();
    wr_valid[2] = 1; wr_idx[2] = '{stage: 4'd11, row: 4'd0, col: 4'd0}; wr_data[2] = 32'h1;
    @(negedge clk);
    idle_inputs();
    @(posedge clk); #1;
    check(overflow && fill == 64, "overflow raised, item dropped");
    read_check(11, 0);   // ref has no such item: must read absent

    // 5. clear empties everything
    @(negedge clk);
    idle_inputs();
    clear = 1;
    @(negedge clk);
    idle_inputs();
    @(posedge clk); #1;
    check(fill == 0 && !overflow && !full, "clear");
    ref_data.delete();
    read_check(0, 0);
    read_check(9, 0);
    write_random(16);
    for (int r = 0; r < 4; r++) read_check(0, r);
    for (int r = 0; r < 4; r++) read_check(1, r);

    // 6. reordering a whole matrix: an 8x8 input matrix written row by row
    //    through the 8 ports, each item indexed with its transposed position,
    //    comes out as the transposed matrix, filling all 64 locations
    @(negedge clk);
    idle_inputs();
    clear = 1;
    ref_data.delete();
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      idle_inputs();
      for (int j = 0; j < WP; j++) begin
        wr_valid[j] = 1;
        wr_idx[j]   = '{stage: 4'd3, row: row_t'(j), col: col_t'(i)};
        wr_data[j]  = 32'(i * 100 + j);           // ID(i,j)
        ref_data[int'(wr_idx[j])] = wr_data[j];
      end
    end
    @(negedge clk);
    idle_inputs();
    @(posedge clk); #1;
    check(full && !overflow, "8x8 matrix fills the memory exactly");
    for (int s = 0; s < 8; s++) begin
      read_check(3, s);
      for (int t = 0; t < RP; t++)
        check(rd_data[t] == 32'(t * 100 + s), $sformatf("transpose OD(%0d,%0d)", s, t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
