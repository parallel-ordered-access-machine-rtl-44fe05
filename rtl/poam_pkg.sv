// poam_pkg: types and constants shared by the parallel ordered-access machine.
//
// Every program component (data item, result index, instruction) is identified
// by an index, never by an address. An index names a position in a matrix:
// the stage the matrix belongs to, the row (one machine step) and the column
// (the memory port it leaves through). The document writes indices as a
// row/column pair numbered from 1 ("11", "23"); here rows and columns are
// numbered from 0 and the stage number is carried explicitly, so that all
// stage matrices can live in one memory at the same time (a choice of this
// design, the document does not say how matrices of different stages are kept
// apart).
//
// The instruction set is the one the document's example uses: mul, add, sub,
// tr (transfer an operand unchanged to a new index) and nop. The encoding is
// this design's own.
package poam_pkg;

  // Field widths of an index.
  localparam int unsigned IDX_STAGE_W = 4;   // up to 16 stage matrices
  localparam int unsigned IDX_ROW_W   = 4;   // up to 16 rows (steps) per stage
  localparam int unsigned IDX_COL_W   = 4;   // up to 16 columns per row
  localparam int unsigned IDX_W       = IDX_STAGE_W + IDX_ROW_W + IDX_COL_W;

  localparam int unsigned MAX_STAGES  = 1 << IDX_STAGE_W;

  typedef logic [IDX_STAGE_W-1:0] stage_t;
  typedef logic [IDX_ROW_W-1:0]   row_t;
  typedef logic [IDX_COL_W-1:0]   col_t;

  typedef struct packed {
    stage_t stage;
    row_t   row;
    col_t   col;
  } poam_idx_t;

  // Operation codes of the ALUs.
  typedef enum logic [2:0] {
    OP_NOP = 3'd0,
    OP_TR  = 3'd1,
    OP_ADD = 3'd2,
    OP_SUB = 3'd3,
    OP_MUL = 3'd4
  } op_t;

  localparam int unsigned OP_W = 3;

endpackage
