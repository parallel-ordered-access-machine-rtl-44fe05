// data_poam: the data memory of the ordered-access machine.
//
// It is an ordered-access memory whose rows are 3*N columns wide: columns
// 0 .. 2N-1 hold the operand pairs of the N ALUs (ALU c takes columns 2c and
// 2c+1) and columns 2N .. 3N-1 hold the N result indices of the step (the
// index under which ALU c must store its result). One row read therefore
// gives everything a step needs besides the instructions: the "row of data
// items" and the "row of indices" of the document's datapath figure. Storing
// the result indices as items of the same memory, each with its own index
// (the document's "indices of the indices"), and placing them in extra
// columns of the same row, is this design's reading of that figure.
//
// Two writers share the N write ports: while the machine runs (run high) the
// ports take the ALU results with their buffered indices (intermediate and
// final data); while it is idle they take items from outside (initial data
// and the result-index items). An outside write attempted while the machine
// runs is ignored and reported on ext_wr_ignored. Reads follow the same
// rule: the sequencer's request while running, the outside request (for
// example to fetch the final data matrix) while idle.
//
// Timing: as the ordered-access memory, one cycle from read request to row.
// A result index is kept in the low IDX_W bits of a data item.
module data_poam
  import poam_pkg::*;
#(
  parameter int unsigned N  = 3,     // number of ALUs
  parameter int unsigned P  = 128,   // locations
  parameter int unsigned DW = 32     // data item width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 run,
  // outside writes: initial data, result-index items
  input  logic [N-1:0]         ext_wr_valid,
  input  poam_idx_t            ext_wr_idx  [N],
  input  logic [DW-1:0]        ext_wr_data [N],
  output logic                 ext_wr_ignored,
  // intermediate data: results from the ALUs with indices from the buffers
  input  logic [N-1:0]         wb_valid,
  input  poam_idx_t            wb_idx  [N],
  input  logic [DW-1:0]        wb_data [N],
  // read requests
  input  logic                 seq_rd_en,
  input  stage_t               seq_rd_stage,
  input  row_t                 seq_rd_row,
  input  logic                 ext_rd_en,
  input  stage_t               ext_rd_stage,
  input  row_t                 ext_rd_row,
  // row out
  output logic                 row_valid,
  output logic [2*N-1:0]       opnd_present,
  output logic [DW-1:0]        opnd [2*N],
  output logic [N-1:0]         ridx_present,
  output poam_idx_t            ridx [N],
  // status
  output logic [$clog2(P+1)-1:0] fill,
  output logic                 full,
  output logic                 overflow
);

  localparam int unsigned COLS = 3 * N;

  logic [N-1:0]    wr_valid;
  poam_idx_t       wr_idx  [N];
  logic [DW-1:0]   wr_data [N];
  logic            rd_en;
  stage_t          rd_stage;
  row_t            rd_row;
  logic [COLS-1:0] present;
  logic [DW-1:0]   data [COLS];

  always_comb begin
    for (int unsigned c = 0; c < N; c++) begin
      wr_valid[c] = run ? wb_valid[c] : ext_wr_valid[c];
      wr_idx[c]   = run ? wb_idx[c]   : ext_wr_idx[c];
      wr_data[c]  = run ? wb_data[c]  : ext_wr_data[c];
    end
    rd_en    = run ? seq_rd_en    : ext_rd_en;
    rd_stage = run ? seq_rd_stage : ext_rd_stage;
    rd_row   = run ? seq_rd_row   : ext_rd_row;
  end

  assign ext_wr_ignored = run && (ext_wr_valid != '0);

  poam #(.P(P), .WPORTS(N), .RPORTS(COLS), .DW(DW)) u_mem (
    .clk, .rst_n, .clear,
    .wr_valid, .wr_idx, .wr_data,
    .rd_en, .rd_stage, .rd_row,
    .rd_valid(row_valid), .rd_present(present), .rd_data(data),
    .fill, .full, .overflow
  );

  always_comb begin
    for (int unsigned k = 0; k < 2*N; k++) begin
      opnd_present[k] = present[k];
      opnd[k]         = data[k];
    end
    for (int unsigned c = 0; c < N; c++) begin
      ridx_present[c] = present[2*N + c];
      ridx[c]         = poam_idx_t'(data[2*N + c][IDX_W-1:0]);
    end
  end

  initial assert (DW >= IDX_W) else $error("data_poam: DW too narrow to hold an index");

endmodule
