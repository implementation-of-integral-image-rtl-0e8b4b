// ii_processor: two-row integral image datapath.
//
// For each beat (column y of rows x = 2p and x+1) it evaluates
//   S(x,y)     = i(x,y)   + S(x,y-1)                     row running sums
//   S(x+1,y)   = i(x+1,y) + S(x+1,y-1)
//   ii(x,y)    = ii(x-1,y) + S(x,y)                      integral values
//   ii(x+1,y)  = ii(x-1,y) + S(x,y) + S(x+1,y)
// so two integral values leave per clock. S(.,-1) and ii(-1,.) are zero: the
// running sums restart at column 0, and the first row pair adds nothing from
// above. ii(x-1,y) is the odd-row result of the previous row pair, read back
// from the integral image memory; every result is also written to it.
//
// Pipeline (three registers, one beat per clock, no stalls):
//   stage 0  latch the pixel pair from the array
//   stage 1  update the two running sums
//   stage 2  read ii(x-1,y), add, write both values to memory, drive pout
// A pixel pair entering on pin appears on pout three clocks later. The memory
// write happens in the same edge as the stage-2 register, so the next row pair
// finds ii(x-1,y) even when the image is only one column wide.
//
// The equations are the document's; the pipeline split is this design's.
module ii_processor #(
  parameter int unsigned MAX_DIM = ii_pkg::MAX_DIM_DEF,
  parameter int unsigned PIX_W   = ii_pkg::PIX_W_DEF,
  parameter int unsigned II_W    = ii_pkg::II_W_DEF,
  parameter int unsigned DIM_W   = $clog2(MAX_DIM + 1),
  parameter int unsigned IDX_W   = $clog2(MAX_DIM)
) (
  input  logic             clk,
  input  logic             rst_n,
  ii_pair_if.snk           pin,      // pixels, DW = PIX_W
  ii_pair_if.src           pout,     // integral values, DW = II_W
  // integral image memory
  output logic             mem_we,
  output logic [IDX_W-1:0] mem_wr_pair,
  output logic [IDX_W-1:0] mem_wr_col,
  output logic [II_W-1:0]  mem_wr_d1,
  output logic [II_W-1:0]  mem_wr_d2,
  output logic [IDX_W-1:0] mem_rd_row,
  output logic [IDX_W-1:0] mem_rd_col,
  input  logic [II_W-1:0]  mem_rd_data
);

  typedef struct packed {
    logic             valid;
    logic [IDX_W-1:0] pair;
    logic [IDX_W-1:0] col;
    logic [DIM_W-1:0] height;
    logic [DIM_W-1:0] width;
    logic             last;
  } beat_t;

  // stage 0
  beat_t            s0;
  logic [PIX_W-1:0] s0_i1, s0_i2;
  // stage 1
  beat_t            s1;
  logic [II_W-1:0]  s_row1, s_row2;   // S(x,y), S(x+1,y)
  // stage 2 (combinational part)
  logic [II_W-1:0]  ii_up;            // ii(x-1,y)
  logic [II_W-1:0]  ii1_n, ii2_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0     <= '0;
      s0_i1  <= '0;
      s0_i2  <= '0;
      s1     <= '0;
      s_row1 <= '0;
      s_row2 <= '0;
    end else begin
      s0     <= '{valid: pin.valid, pair: pin.pair, col: pin.col,
                  height: pin.height, width: pin.width, last: pin.last};
      s0_i1  <= pin.d1;
      s0_i2  <= pin.d2;
      s1     <= s0;
      if (s0.valid) begin
        // Equations (4) and (5)
        s_row1 <= ((s0.col == '0) ? '0 : s_row1) + II_W'(s0_i1);
        s_row2 <= ((s0.col == '0) ? '0 : s_row2) + II_W'(s0_i2);
      end
    end
  end

  // ii(x-1,y) is row 2p-1, the odd row of the previous pair.
  assign mem_rd_row = IDX_W'(2 * 32'(s1.pair) - 1);
  assign mem_rd_col = s1.col;
  assign ii_up      = (s1.pair == '0) ? '0 : mem_rd_data;

  // Equations (6) and (7)
  assign ii1_n = ii_up + s_row1;
  assign ii2_n = ii_up + s_row1 + s_row2;

  assign mem_we      = s1.valid;
  assign mem_wr_pair = s1.pair;
  assign mem_wr_col  = s1.col;
  assign mem_wr_d1   = ii1_n;
  assign mem_wr_d2   = ii2_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pout.valid  <= 1'b0;
      pout.d1     <= '0;
      pout.d2     <= '0;
      pout.pair   <= '0;
      pout.col    <= '0;
      pout.height <= '0;
      pout.width  <= '0;
      pout.last   <= 1'b0;
    end else begin
      pout.valid  <= s1.valid;
      pout.pair   <= s1.pair;
      pout.col    <= s1.col;
      pout.height <= s1.height;
      pout.width  <= s1.width;
      pout.last   <= s1.valid && s1.last;
      if (s1.valid) begin
        pout.d1 <= ii1_n;
        pout.d2 <= ii2_n;
      end
    end
  end

endmodule
