// ii_output_block: result port of the two-row integral image core.
//
// Registers each beat from the processor onto the core's output pins: out1 is
// ii(x,y) of the even row, out2 is ii(x+1,y) of the row below, col is the
// column y, and height and width repeat the frame size. The block also turns
// the row-pair index into the row number x = 2p (row), and raises frame_done
// for the clock that carries the frame's last pair. All outputs change one
// clock after the beat arrives; out1, out2 and col hold their last value while
// out_valid is low.
//
// The out1/out2/col/height/width set follows the document; out_valid, row and
// frame_done are this design's additions so that a receiver can tell when a
// value is new and when a frame is complete.
module ii_output_block #(
  parameter int unsigned MAX_DIM = ii_pkg::MAX_DIM_DEF,
  parameter int unsigned II_W    = ii_pkg::II_W_DEF,
  parameter int unsigned DIM_W   = $clog2(MAX_DIM + 1),
  parameter int unsigned IDX_W   = $clog2(MAX_DIM)
) (
  input  logic             clk,
  input  logic             rst_n,
  ii_pair_if.snk           pin,
  output logic             out_valid,
  output logic [II_W-1:0]  out1,        // ii(x, y)
  output logic [II_W-1:0]  out2,        // ii(x+1, y)
  output logic [IDX_W-1:0] col,         // y
  output logic [IDX_W-1:0] row,         // x (even)
  output logic [DIM_W-1:0] height,
  output logic [DIM_W-1:0] width,
  output logic             frame_done
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out1       <= '0;
      out2       <= '0;
      col        <= '0;
      row        <= '0;
      height     <= '0;
      width      <= '0;
      frame_done <= 1'b0;
    end else begin
      out_valid  <= pin.valid;
      frame_done <= pin.valid && pin.last;
      if (pin.valid) begin
        out1   <= pin.d1;
        out2   <= pin.d2;
        col    <= pin.col;
        row    <= IDX_W'(2 * 32'(pin.pair));
        height <= pin.height;
        width  <= pin.width;
      end
    end
  end

endmodule
