// poam: parallel ordered-access memory (memory array + entering-fetching device).
//
// What it does: items are written together with an index (stage, row, column)
// and are read back a whole row at a time, already ordered by their indices:
// reading row (stage s, row r) returns on read port t the item whose index is
// (s, r, t). The writer never supplies an address and the reader never asks
// for one; the memory places each item itself and orders the output.
//
// How it works: the memory array has P locations, each holding a valid bit,
// an index and a data item, as in the document's organisation figure. The
// entering part of the entering-fetching device (EFD) puts the items that
// arrive on the WPORTS write ports in the same cycle into the next free
// locations, in port order, so up to WPORTS items enter per cycle without
// conflict. The fetching part compares, for each of the RPORTS output
// columns, the requested position with the index of every location and
// selects the matching data item. A column for which no item was written
// reads as absent (rd_present low): the document's "nd" (no data item) and
// "ni" (no instruction). Reading does not consume items; clear empties the
// whole array. The document states only what the EFD does; the fill-in-order
// placement and the parallel index compare are this design's choice of the
// simplest logic that does it. If two items carry the same index, the one
// written first is returned (this design's choice; the document assumes
// indices are unique).
//
// Timing: a write is stored at the clock edge where wr_valid is high. A read
// request (rd_en, rd_stage, rd_row) is answered one cycle later with rd_valid
// high; it sees the array as it was before the edge at which it is sampled,
// so an item written in cycle c can be read by a request issued in c+1.
// Items arriving while the array is full are dropped and set the sticky
// overflow flag, which only clear or reset lowers.
//
// The document's standalone example is an 8-port, 32-bit POAM, hence the
// default port count and width; the capacity P is this design's choice.
module poam
  import poam_pkg::*;
#(
  parameter int unsigned P      = 64,   // locations in the memory array
  parameter int unsigned WPORTS = 8,    // write ports (l)
  parameter int unsigned RPORTS = 8,    // read ports / columns of a row (n)
  parameter int unsigned DW     = 32    // width of a data item
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,          // empty the memory array
  // entering side
  input  logic [WPORTS-1:0]      wr_valid,
  input  poam_idx_t              wr_idx  [WPORTS],
  input  logic [DW-1:0]          wr_data [WPORTS],
  // fetching side
  input  logic                   rd_en,
  input  stage_t                 rd_stage,
  input  row_t                   rd_row,
  output logic                   rd_valid,
  output logic [RPORTS-1:0]      rd_present,
  output logic [DW-1:0]          rd_data [RPORTS],
  // status
  output logic [$clog2(P+1)-1:0] fill,           // locations in use
  output logic                   full,
  output logic                   overflow        // an item was dropped
);

  localparam int unsigned FW = $clog2(P+1);
  localparam int unsigned AW = (P > 1) ? $clog2(P) : 1;

  // Memory array.
  logic              loc_valid [P];
  poam_idx_t         loc_idx   [P];
  logic [DW-1:0]     loc_data  [P];

  // ---------------------------------------------------------------------
  // Entering: the j-th valid item of this cycle goes to location fill+j.
  // ---------------------------------------------------------------------
  logic [FW:0]       slot      [WPORTS];   // one spare bit to see P and above
  logic [WPORTS-1:0] slot_ok;
  logic [FW:0]       n_enter;

  always_comb begin
    logic [FW:0] k;
    k = '0;
    for (int unsigned j = 0; j < WPORTS; j++) begin
      slot[j]    = {1'b0, fill} + k;
      slot_ok[j] = wr_valid[j] && (slot[j] < (FW+1)'(P));
      if (wr_valid[j]) k = k + 1'b1;
    end
    n_enter = '0;
    for (int unsigned j = 0; j < WPORTS; j++)
      if (slot_ok[j]) n_enter = n_enter + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill     <= '0;
      overflow <= 1'b0;
      for (int unsigned p = 0; p < P; p++) loc_valid[p] <= 1'b0;
    end else if (clear) begin
      fill     <= '0;
      overflow <= 1'b0;
      for (int unsigned p = 0; p < P; p++) loc_valid[p] <= 1'b0;
    end else begin
      fill <= FW'({1'b0, fill} + n_enter);
      if ((wr_valid & ~slot_ok) != '0) overflow <= 1'b1;
      for (int unsigned j = 0; j < WPORTS; j++) begin
        if (slot_ok[j]) begin
          loc_valid[slot[j][AW-1:0]] <= 1'b1;
          loc_idx  [slot[j][AW-1:0]] <= wr_idx[j];
        end
      end
    end
  end

  // Data items need no reset: a location is only read while its valid bit is set.
  always_ff @(posedge clk) begin
    for (int unsigned j = 0; j < WPORTS; j++)
      if (slot_ok[j] && !clear) loc_data[slot[j][AW-1:0]] <= wr_data[j];
  end

  assign full = (fill == FW'(P));

  // ---------------------------------------------------------------------
  // Fetching: column t of the requested row is the item indexed (s, r, t).
  // ---------------------------------------------------------------------
  logic [RPORTS-1:0] hit;
  logic [DW-1:0]     hit_data [RPORTS];

  always_comb begin
    for (int unsigned t = 0; t < RPORTS; t++) begin
      hit[t]      = 1'b0;
      hit_data[t] = '0;
      // Scan from the top so that the lowest (oldest) matching location wins.
      for (int p = int'(P) - 1; p >= 0; p--) begin
        if (loc_valid[p] && loc_idx[p].stage == rd_stage &&
            loc_idx[p].row == rd_row && loc_idx[p].col == col_t'(t)) begin
          hit[t]      = 1'b1;
          hit_data[t] = loc_data[p];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid   <= 1'b0;
      rd_present <= '0;
    end else begin
      rd_valid   <= rd_en;
      if (rd_en) rd_present <= hit;
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en)
      for (int unsigned t = 0; t < RPORTS; t++) rd_data[t] <= hit_data[t];
  end

  // The columns of one row must be addressable by the column field.
  initial assert (RPORTS <= (1 << IDX_COL_W))
    else $error("poam: RPORTS exceeds the column field of an index");

endmodule
