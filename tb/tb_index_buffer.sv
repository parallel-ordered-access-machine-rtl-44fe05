// tb_index_buffer: self-checking test of the index buffer.
//
// Runs two instances, with delays of one and three cycles, on the same
// random stream of (valid, index) pairs and checks that each output equals
// the input the given number of cycles earlier, kept in a history array.
module tb_index_buffer;
  import poam_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      in_valid;
  poam_idx_t in_idx;
  logic      v1, v3;
  poam_idx_t i1, i3;

  index_buffer #(.LAT(1)) dut1 (.clk, .rst_n, .in_valid, .in_idx, .out_valid(v1), .out_idx(i1));
  index_buffer #(.LAT(3)) dut3 (.clk, .rst_n, .in_valid, .in_idx, .out_valid(v3), .out_idx(i3));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic      hv [0:1023];
  poam_idx_t hi [0:1023];

  initial begin
    in_valid = 0; in_idx = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 1) == 1;
      in_idx   = poam_idx_t'($urandom);
      hv[i] = in_valid; hi[i] = in_idx;
      @(posedge clk); #1;
      check(v1 == hv[i], "LAT=1 valid");
      if (hv[i]) check(i1 == hi[i], "LAT=1 index");
      if (i >= 2) begin
        check(v3 == hv[i-2], "LAT=3 valid");
        if (hv[i-2]) check(i3 == hi[i-2], "LAT=3 index");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
