// index_buffer: the buffer B that sits beside each ALU.
//
// While an ALU computes, the index under which its result must be stored has
// already left the data memory together with the operands. The buffer holds
// that index (and whether one was present at all) for exactly as many cycles
// as the ALU takes, so that result and index reach the data memory's write
// port in the same cycle. The document names the buffers and shows where
// they sit; that they are a fixed-delay pipeline of depth LAT is this
// design's reading of their role.
//
// Timing: the value on in_valid/in_idx appears on out_valid/out_idx LAT
// cycles later. LAT matches the ALU latency (one cycle).
module index_buffer
  import poam_pkg::*;
#(
  parameter int unsigned LAT = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  poam_idx_t in_idx,
  output logic      out_valid,
  output poam_idx_t out_idx
);

  logic      v_q [LAT];
  poam_idx_t i_q [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < LAT; k++) begin
        v_q[k] <= 1'b0;
        i_q[k] <= '0;
      end
    end else begin
      v_q[0] <= in_valid;
      i_q[0] <= in_idx;
      for (int unsigned k = 1; k < LAT; k++) begin
        v_q[k] <= v_q[k-1];
        i_q[k] <= i_q[k-1];
      end
    end
  end

  assign out_valid = v_q[LAT-1];
  assign out_idx   = i_q[LAT-1];

  initial assert (LAT >= 1) else $error("index_buffer: LAT must be at least 1");

endmodule
