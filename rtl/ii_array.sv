// ii_array: image store of the two-row integral image core.
//
// The array holds the input image at its own coordinates, img[x][y] = i(x,y).
// It works in two phases. LOAD: every pair written by the input block goes to
// rows 2p and 2p+1 of column y, where a counter walks y across the width and
// then moves to the next row pair p. When the last pair of the frame
// (p = height/2-1, y = width-1) is written the array switches to XFER: it reads
// one column of one row pair per clock, in the same order, and presents it to
// the processor on a registered ii_pair_if beat, one clock after the read is
// issued. xfer_done is high in the clock that issues the last read; the array
// is back in LOAD on the next clock.
//
// Timing: the first beat leaves the array two clocks after the last write
// (one clock to change phase, one for the registered read). Transferring only
// once the whole image is in follows the document; the counter order and the
// one-beat-per-clock rate follow its description of the two-row scan.
module ii_array #(
  parameter int unsigned MAX_DIM = ii_pkg::MAX_DIM_DEF,
  parameter int unsigned PIX_W   = ii_pkg::PIX_W_DEF,
  parameter int unsigned DIM_W   = $clog2(MAX_DIM + 1),
  parameter int unsigned IDX_W   = $clog2(MAX_DIM)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  input  logic [PIX_W-1:0] wr_pix1,
  input  logic [PIX_W-1:0] wr_pix2,
  input  logic [DIM_W-1:0] wr_height,
  input  logic [DIM_W-1:0] wr_width,
  output logic             xfer_done,
  ii_pair_if.src           pout
);

  typedef enum logic {LOAD, XFER} phase_e;

  phase_e           phase;
  logic [PIX_W-1:0] img [MAX_DIM][MAX_DIM];
  logic [IDX_W-1:0] wp, wy;    // write position: row pair, column
  logic [IDX_W-1:0] rp, ry;    // read position
  logic [DIM_W-1:0] xh, xw;    // size of the frame being transferred
  logic             wr_last, rd_last;

  assign wr_last   = (32'(wp) == 32'(wr_height) / 2 - 1) && (32'(wy) == 32'(wr_width) - 1);
  assign rd_last   = (32'(rp) == 32'(xh) / 2 - 1) && (32'(ry) == 32'(xw) - 1);
  assign xfer_done = (phase == XFER) && rd_last;

  // Pixel storage: no reset, every cell is written before it is read.
  always_ff @(posedge clk) begin
    if (phase == LOAD && wr_valid) begin
      img[2 * 32'(wp)][wy]     <= wr_pix1;
      img[2 * 32'(wp) + 1][wy] <= wr_pix2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= LOAD;
      wp          <= '0;
      wy          <= '0;
      rp          <= '0;
      ry          <= '0;
      xh          <= '0;
      xw          <= '0;
      pout.valid  <= 1'b0;
      pout.d1     <= '0;
      pout.d2     <= '0;
      pout.pair   <= '0;
      pout.col    <= '0;
      pout.height <= '0;
      pout.width  <= '0;
      pout.last   <= 1'b0;
    end else begin
      pout.valid <= 1'b0;
      pout.last  <= 1'b0;
      unique case (phase)
        LOAD: begin
          if (wr_valid) begin
            if (wr_last) begin
              wp    <= '0;
              wy    <= '0;
              xh    <= wr_height;
              xw    <= wr_width;
              rp    <= '0;
              ry    <= '0;
              phase <= XFER;
            end else if (32'(wy) == 32'(wr_width) - 1) begin
              wy <= '0;
              wp <= wp + 1'b1;
            end else begin
              wy <= wy + 1'b1;
            end
          end
        end
        XFER: begin
          pout.valid  <= 1'b1;
          pout.d1     <= img[2 * 32'(rp)][ry];
          pout.d2     <= img[2 * 32'(rp) + 1][ry];
          pout.pair   <= rp;
          pout.col    <= ry;
          pout.height <= xh;
          pout.width  <= xw;
          pout.last   <= rd_last;
          if (rd_last) begin
            phase <= LOAD;
          end else if (32'(ry) == 32'(xw) - 1) begin
            ry <= '0;
            rp <= rp + 1'b1;
          end else begin
            ry <= ry + 1'b1;
          end
        end
        default: phase <= LOAD;
      endcase
    end
  end

  // The input block holds new pixels back until the transfer is over.
  a_no_write_in_xfer: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid |-> phase == LOAD);

endmodule
