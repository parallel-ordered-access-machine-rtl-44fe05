// instr_poam: the instruction memory of the ordered-access machine.
//
// An ordered-access memory with N columns, one per ALU. Instructions are
// written from outside with their indices (stage, row = step, column = ALU)
// before the program runs; while it runs, the sequencer reads one row per
// step and column c goes to ALU c. A position to which no instruction was
// written (the document's "ni", no instruction) is issued as nop, and so is
// a stored code that is not a known operation. Outside writes while the
// machine runs are ignored and reported on wr_ignored.
//
// Timing: one cycle from read request to the instruction row (row_valid).
module instr_poam
  import poam_pkg::*;
#(
  parameter int unsigned N = 3,    // number of ALUs
  parameter int unsigned P = 64    // locations
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               run,
  input  logic [N-1:0]       wr_valid,
  input  poam_idx_t          wr_idx [N],
  input  op_t                wr_op  [N],
  output logic               wr_ignored,
  input  logic               rd_en,
  input  stage_t             rd_stage,
  input  row_t               rd_row,
  output logic               row_valid,
  output op_t                row_op [N],
  output logic [N-1:0]       row_ni,          // position held no instruction
  output logic [$clog2(P+1)-1:0] fill,
  output logic               full,
  output logic               overflow
);

  logic [N-1:0]    mem_wr_valid;
  logic [OP_W-1:0] mem_wr_data [N];
  logic [N-1:0]    present;
  logic [OP_W-1:0] code [N];

  always_comb begin
    for (int unsigned c = 0; c < N; c++) begin
      mem_wr_valid[c] = wr_valid[c] && !run;
      mem_wr_data[c]  = wr_op[c];
    end
  end

  assign wr_ignored = run && (wr_valid != '0);

  poam #(.P(P), .WPORTS(N), .RPORTS(N), .DW(OP_W)) u_mem (
    .clk, .rst_n, .clear,
    .wr_valid(mem_wr_valid), .wr_idx, .wr_data(mem_wr_data),
    .rd_en, .rd_stage, .rd_row,
    .rd_valid(row_valid), .rd_present(present), .rd_data(code),
    .fill, .full, .overflow
  );

  always_comb begin
    for (int unsigned c = 0; c < N; c++) begin
      row_ni[c] = !present[c];
      unique case (code[c])
        OP_TR, OP_ADD, OP_SUB, OP_MUL: row_op[c] = present[c] ? op_t'(code[c]) : OP_NOP;
        default:                       row_op[c] = OP_NOP;
      endcase
    end
  end

endmodule
