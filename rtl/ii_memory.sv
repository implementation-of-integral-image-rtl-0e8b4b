// ii_memory: integral image store of the two-row core.
//
// Holds one integral value per pixel, mem[x][y] = ii(x,y), in words of II_W
// bits (15 bits for the default 10 x 10 frame of 8-bit pixels). The write port
// takes both values the processor produces in one clock, ii(2p,y) and
// ii(2p+1,y), in the same clock edge. Read port A serves the processor, which
// needs ii(x-1,y) of the previous row pair; read port B lets a following stage
// (for example Haar feature extraction) read any stored value. Both reads are
// combinational: the data follows the address in the same clock, and a read of
// a word being written returns the old value.
//
// The document sizes this memory by its word width; the two write ports and the
// two read ports are this design's choice.
module ii_memory #(
  parameter int unsigned MAX_DIM = ii_pkg::MAX_DIM_DEF,
  parameter int unsigned II_W    = ii_pkg::II_W_DEF,
  parameter int unsigned IDX_W   = $clog2(MAX_DIM)
) (
  input  logic             clk,
  // write port: one row pair, one column
  input  logic             we,
  input  logic [IDX_W-1:0] wr_pair,
  input  logic [IDX_W-1:0] wr_col,
  input  logic [II_W-1:0]  wr_d1,     // ii(2p, y)
  input  logic [II_W-1:0]  wr_d2,     // ii(2p+1, y)
  // read port A (processor)
  input  logic [IDX_W-1:0] ra_row,
  input  logic [IDX_W-1:0] ra_col,
  output logic [II_W-1:0]  ra_data,
  // read port B (next stage)
  input  logic [IDX_W-1:0] rb_row,
  input  logic [IDX_W-1:0] rb_col,
  output logic [II_W-1:0]  rb_data
);

  logic [II_W-1:0] mem [MAX_DIM][MAX_DIM];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[2 * 32'(wr_pair)][wr_col]     <= wr_d1;
      mem[2 * 32'(wr_pair) + 1][wr_col] <= wr_d2;
    end
  end

  // Out-of-range addresses read as zero.
  assign ra_data = (32'(ra_row) < MAX_DIM && 32'(ra_col) < MAX_DIM) ? mem[ra_row][ra_col] : '0;
  assign rb_data = (32'(rb_row) < MAX_DIM && 32'(rb_col) < MAX_DIM) ? mem[rb_row][rb_col] : '0;

endmodule
