// poam_machine: data and instruction path of the parallel ordered-access machine.
//
// The machine runs a program that has been cut into stages: every operation
// of a stage depends only on results of earlier stages. Each stage is a set
// of matrices: an instruction matrix (one column per ALU, one row per step),
// an operand matrix (two columns per ALU) and a result-index matrix (one
// column per ALU). Nothing in the program carries an address. Each item is
// stored with an index naming its place in its matrix, and the ordered-access
// memories hand out whole rows already in that order.
//
// Structure (after the document's datapath figure): a data memory
// (data_poam), an instruction memory (instr_poam), N ALUs and, beside each
// ALU, a buffer B (index_buffer) that carries the result index along while
// the ALU works. The stage/step sequencer (exec_controller) supplies the
// control signals. In every step one row is read from both memories. ALU c
// executes instruction c on operand columns 2c and 2c+1. Its result is
// written back into the data memory under the index that came out of index
// column c of the same row. Written that way, the results of stage s form
// the operand matrix of stage s+1 in the memory, already in order. After the
// last stage the final data matrix can be read out row by row.
//
// Use: with the machine idle, clear, then write the initial operands and the
// result-index items through dm_wr_* and the instructions through im_wr_*
// (N items per cycle each). Pulse start with num_stages and steps[]. When
// done pulses, read the final matrix (stage num_stages) through rd_*.
//
// Timing: one step per cycle within a stage and DRAIN = 2 idle cycles at the
// end of every stage (read, execute and write-back each take one cycle). A
// program of S stages and T steps in total finishes T + 2*S + 1 cycles after
// start. Defaults: N = 3 ALUs as in the document's worked example; 32-bit
// data as in the document's 8-port 32-bit memory; the capacities are this
// design's choice.
module poam_machine
  import poam_pkg::*;
#(
  parameter int unsigned N       = 3,     // ALUs (and buffers)
  parameter int unsigned DW      = 32,    // data item width
  parameter int unsigned P_DATA  = 128,   // data memory locations
  parameter int unsigned P_INSTR = 64     // instruction memory locations
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  // loading the data memory (initial data, indices of the result indices)
  input  logic [N-1:0]         dm_wr_valid,
  input  poam_idx_t            dm_wr_idx  [N],
  input  logic [DW-1:0]        dm_wr_data [N],
  // loading the instruction memory
  input  logic [N-1:0]         im_wr_valid,
  input  poam_idx_t            im_wr_idx [N],
  input  op_t                  im_wr_op  [N],
  // execution control
  input  logic                 start,
  input  logic [IDX_STAGE_W-1:0] num_stages,
  input  logic [IDX_ROW_W:0]   steps [MAX_STAGES],
  output logic                 busy,
  output logic                 stall,
  output logic                 done,
  output logic                 stage_done,      // pulse: a stage's results are all stored
  // reading the final data matrix
  input  logic                 rd_en,
  input  stage_t               rd_stage,
  input  row_t                 rd_row,
  output logic                 rd_valid,
  output logic [2*N-1:0]       rd_present,
  output logic [DW-1:0]        rd_data [2*N],
  // status
  output logic [$clog2(P_DATA+1)-1:0]  dm_fill,
  output logic [$clog2(P_INSTR+1)-1:0] im_fill,
  output logic                 dm_full,
  output logic                 im_full,
  output logic                 dm_overflow,
  output logic                 im_overflow,
  output logic                 load_ignored,    // load attempted while running
  output logic [N-1:0]         operand_err,     // ALU lacked an operand
  output logic [N-1:0]         result_dropped,  // result without a result index
  output logic [N-1:0]         instr_absent     // step issued with no instruction in a column
);

  // sequencer
  logic   seq_rd_en;
  stage_t seq_rd_stage;
  row_t   seq_rd_row;

  exec_controller #(.DRAIN(2)) u_ctrl (
    .clk, .rst_n, .start, .num_stages, .steps,
    .rd_en(seq_rd_en), .rd_stage(seq_rd_stage), .rd_row(seq_rd_row),
    .busy, .stall, .stage_end(stage_done), .done
  );

  // data memory
  logic            dm_row_valid;
  logic [2*N-1:0]  opnd_present;
  logic [DW-1:0]   opnd [2*N];
  logic [N-1:0]    ridx_present;
  poam_idx_t       ridx [N];
  logic [N-1:0]    wb_valid;
  poam_idx_t       wb_idx  [N];
  logic [DW-1:0]   wb_data [N];
  logic            dm_ignored, im_ignored;

  data_poam #(.N(N), .P(P_DATA), .DW(DW)) u_dmem (
    .clk, .rst_n, .clear, .run(busy),
    .ext_wr_valid(dm_wr_valid), .ext_wr_idx(dm_wr_idx), .ext_wr_data(dm_wr_data),
    .ext_wr_ignored(dm_ignored),
    .wb_valid, .wb_idx, .wb_data,
    .seq_rd_en, .seq_rd_stage, .seq_rd_row,
    .ext_rd_en(rd_en), .ext_rd_stage(rd_stage), .ext_rd_row(rd_row),
    .row_valid(dm_row_valid), .opnd_present, .opnd, .ridx_present, .ridx,
    .fill(dm_fill), .full(dm_full), .overflow(dm_overflow)
  );

  // instruction memory
  logic       im_row_valid;
  op_t        row_op [N];
  logic [N-1:0] row_ni;

  instr_poam #(.N(N), .P(P_INSTR)) u_imem (
    .clk, .rst_n, .clear, .run(busy),
    .wr_valid(im_wr_valid), .wr_idx(im_wr_idx), .wr_op(im_wr_op), .wr_ignored(im_ignored),
    .rd_en(seq_rd_en), .rd_stage(seq_rd_stage), .rd_row(seq_rd_row),
    .row_valid(im_row_valid), .row_op, .row_ni,
    .fill(im_fill), .full(im_full), .overflow(im_overflow)
  );

  assign instr_absent = im_row_valid ? row_ni : '0;
  assign load_ignored = dm_ignored || im_ignored;

  // outside view of the data memory rows
  assign rd_valid   = dm_row_valid && !busy;
  assign rd_present = opnd_present;
  always_comb for (int unsigned k = 0; k < 2*N; k++) rd_data[k] = opnd[k];

  // ALUs and their index buffers
  for (genvar c = 0; c < N; c++) begin : g_lane
    logic          res_valid;
    logic [DW-1:0] res;
    logic          idx_valid;
    poam_idx_t     idx;

    alu #(.DW(DW)) u_alu (
      .clk, .rst_n,
      .in_valid(im_row_valid), .op(row_op[c]),
      .a_present(opnd_present[2*c]),   .a(opnd[2*c]),
      .b_present(opnd_present[2*c+1]), .b(opnd[2*c+1]),
      .res_valid, .res, .operand_err(operand_err[c])
    );

    index_buffer #(.LAT(1)) u_buf (
      .clk, .rst_n,
      .in_valid(im_row_valid && ridx_present[c]), .in_idx(ridx[c]),
      .out_valid(idx_valid), .out_idx(idx)
    );

    assign wb_valid[c]       = res_valid && idx_valid;
    assign wb_idx[c]         = idx;
    assign wb_data[c]        = res;
    assign result_dropped[c] = res_valid && !idx_valid;
  end

  // The sequencer's reads reach both memories in the same cycle. The check is
  // off during reset (lint reports rst_n as used both asynchronously and in
  // this synchronous disable; that is intended).
  ap_rows_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (im_row_valid == dm_row_valid));

endmodule
