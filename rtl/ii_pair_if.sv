// ii_pair_if: one column of a row pair, moving down the core's pipeline.
//
// Each beat carries two values of the same column y: d1 belongs to the even
// row x = 2*pair and d2 to the odd row x+1. Between the array and the
// processor they are pixels; between the processor and the output block they
// are integral values. A beat is valid for exactly one clock; there is no
// back-pressure, the receiver always takes it. The frame's height and width
// travel with every beat, and last marks the final column of the final pair.
// The bundle itself is this design's choice; the architecture only fixes which
// values flow from block to block.
interface ii_pair_if #(
  parameter int unsigned DW    = 8,   // width of d1 and d2
  parameter int unsigned IDX_W = 4,   // width of pair and col
  parameter int unsigned DIM_W = 4    // width of height and width
);
  logic             valid;
  logic [DW-1:0]    d1;
  logic [DW-1:0]    d2;
  logic [IDX_W-1:0] pair;
  logic [IDX_W-1:0] col;
  logic [DIM_W-1:0] height;
  logic [DIM_W-1:0] width;
  logic             last;

  modport src (output valid, d1, d2, pair, col, height, width, last);
  modport snk (input  valid, d1, d2, pair, col, height, width, last);
endinterface
