// ii_input_block: pixel-pair intake of the two-row integral image core.
//
// The image arrives two rows at a time: input1 carries pixel i(x,y) of the
// even row x and input2 pixel i(x+1,y) of the row below it, one column y per
// clock, columns left to right, then the next row pair (x+2). height and width
// give the image size; they are sampled with the first pair of a frame and held
// for the rest of it. Each accepted pair is registered and handed to the array
// block one clock later (wr_* outputs, valid for one clock).
//
// Handshake (a choice of this design): a pair is taken on a clock edge where
// in_valid and in_ready are both high. After the last pair of a frame
// (height*width/2 pairs) in_ready falls, and rises again the clock after the
// array reports that it has passed the whole frame to the processor
// (xfer_done), so the array is never overwritten while it is being read.
// height must be even and non-zero, width non-zero, both at most MAX_DIM.
module ii_input_block #(
  parameter int unsigned MAX_DIM = ii_pkg::MAX_DIM_DEF,
  parameter int unsigned PIX_W   = ii_pkg::PIX_W_DEF,
  parameter int unsigned DIM_W   = $clog2(MAX_DIM + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // source side
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [PIX_W-1:0] input1,     // pixel of row x
  input  logic [PIX_W-1:0] input2,     // pixel of row x+1
  input  logic [DIM_W-1:0] height,     // M, image height
  input  logic [DIM_W-1:0] width,      // N, image width
  // array side
  input  logic             xfer_done,  // array finished reading out a frame
  output logic             wr_valid,
  output logic [PIX_W-1:0] wr_pix1,
  output logic [PIX_W-1:0] wr_pix2,
  output logic [DIM_W-1:0] wr_height,
  output logic [DIM_W-1:0] wr_width
);

  localparam int unsigned CNT_W = $clog2(MAX_DIM * MAX_DIM / 2 + 1);

  logic             accept;
  logic [CNT_W-1:0] cnt;        // pairs taken so far in this frame
  logic [CNT_W-1:0] total_q;    // pairs in this frame
  logic [CNT_W-1:0] total_now;
  logic [DIM_W-1:0] h_q, w_q;
  logic [DIM_W-1:0] h_now, w_now;
  logic             first;

  assign accept    = in_valid && in_ready;
  assign first     = (cnt == '0);
  assign h_now     = first ? height : h_q;
  assign w_now     = first ? width  : w_q;
  assign total_now = first ? CNT_W'((32'(height) * 32'(width)) >> 1) : total_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_ready  <= 1'b1;
      cnt       <= '0;
      total_q   <= '0;
      h_q       <= '0;
      w_q       <= '0;
      wr_valid  <= 1'b0;
      wr_pix1   <= '0;
      wr_pix2   <= '0;
      wr_height <= '0;
      wr_width  <= '0;
    end else begin
      wr_valid <= accept;
      if (accept) begin
        wr_pix1   <= input1;
        wr_pix2   <= input2;
        wr_height <= h_now;
        wr_width  <= w_now;
        h_q       <= h_now;
        w_q       <= w_now;
        total_q   <= total_now;
        if (cnt == total_now - 1'b1) begin
          cnt      <= '0;
          in_ready <= 1'b0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
      if (xfer_done) in_ready <= 1'b1;
    end
  end

  // A frame's size must be legal when its first pair is taken.
  a_legal_size: assert property (@(posedge clk) disable iff (!rst_n)
    (accept && first) |-> (height != 0 && height[0] == 1'b0 && 32'(height) <= MAX_DIM
                           && width != 0 && 32'(width) <= MAX_DIM));

endmodule
