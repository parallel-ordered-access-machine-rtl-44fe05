// tb_exec_controller: self-checking test of the stage/step sequencer.
//
// For random programs (1 to 6 stages, 0 to 6 steps per stage) it records the
// row requests the sequencer makes and compares them with the expected order:
// every row of stage 0, then every row of stage 1, and so on. It checks the
// cycle timing: one request per cycle within a stage, DRAIN cycles between
// stages, done exactly 1 + sum(max(steps,1) + DRAIN) cycles after start. It
// also checks the stall and stage-end counts, that start is ignored while
// busy, and a zero-stage program.
module tb_exec_controller;
  import poam_pkg::*;

  localparam int unsigned DRAIN = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                   start;
  logic [IDX_STAGE_W-1:0] num_stages;
  logic [IDX_ROW_W:0]     steps [MAX_STAGES];
  logic                   rd_en, busy, stall, stage_end, done;
  stage_t                 rd_stage;
  row_t                   rd_row;

  exec_controller #(.DRAIN(DRAIN)) dut (.*);

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

  initial begin
    start = 0; num_stages = '0;
    for (int s = 0; s < MAX_STAGES; s++) steps[s] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    for (int prog = 0; prog < 60; prog++) begin
      int ns, exp_cycles, cyc, n_req, n_stall, n_end, exp_req, exp_stall;
      int req_s [$], req_r [$], req_c [$];
      int orig [MAX_STAGES];
      req_s.delete(); req_r.delete(); req_c.delete();
      ns = (prog == 0) ? 0 : $urandom_range(1, 6);
      @(negedge clk);
      num_stages = IDX_STAGE_W'(ns);
      for (int s = 0; s < MAX_STAGES; s++) steps[s] = (IDX_ROW_W+1)'($urandom_range(0, 6));
      if (prog == 1) steps[0] = '0;   // an empty first stage at least once
      exp_cycles = 1; exp_req = 0; exp_stall = 0;
      for (int s = 0; s < ns; s++) begin
        exp_cycles += ((steps[s] == 0) ? 1 : int'(steps[s])) + DRAIN;
        exp_req    += int'(steps[s]);
        exp_stall  += DRAIN;
      end
      for (int s = 0; s < MAX_STAGES; s++) orig[s] = int'(steps[s]);
      start = 1;
      @(negedge clk);
      start = 0;
      // change the inputs: they must have been captured at start
      for (int s = 0; s < MAX_STAGES; s++) steps[s] = '1;
      num_stages = '1;
      cyc = 1; n_req = 0; n_stall = 0; n_end = 0;
      while (!done && cyc < 500) begin
        if (rd_en) begin req_s.push_back(int'(rd_stage)); req_r.push_back(int'(rd_row)); req_c.push_back(cyc); end
        if (stall) n_stall++;
        if (cyc == 2) start = 1;     // ignored while busy
        if (cyc == 3) start = 0;
        @(negedge clk);
        if (stage_end) n_end++;
        cyc++;
      end
      check(cyc == exp_cycles, $sformatf("prog %0d: done after %0d cycles, expected %0d", prog, cyc, exp_cycles));
      check(req_s.size() == exp_req, $sformatf("prog %0d: %0d requests, expected %0d", prog, req_s.size(), exp_req));
      check(n_stall == exp_stall, $sformatf("prog %0d: %0d stall cycles", prog, n_stall));
      check(n_end == ns, $sformatf("prog %0d: %0d stage ends", prog, n_end));
      // expected order and timing
      begin
        int k, c;
        k = 0; c = 1;
        for (int s = 0; s < ns; s++) begin
          int rows;
          rows = 0;
          while (k + rows < req_s.size() && req_s[k + rows] == s) rows++;
          for (int r = 0; r < rows; r++) begin
            check(req_r[k + r] == r, $sformatf("prog %0d: stage %0d row order", prog, s));
            check(req_c[k + r] == c + r, $sformatf("prog %0d: stage %0d row %0d cycle", prog, s, r));
          end
          k += rows;
          c += ((rows == 0) ? 1 : rows) + DRAIN;
          check(rows == orig[s], $sformatf("prog %0d: stage %0d has %0d rows", prog, s, rows));
        end
        check(k == req_s.size(), $sformatf("prog %0d: requests in stage order", prog));
      end
      @(negedge clk);
      check(!busy, "idle after done");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
