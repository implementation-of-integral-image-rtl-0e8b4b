// ii_top: two-row integral image core for small gray images.
//
// An image of up to MAX_DIM x MAX_DIM 8-bit pixels (height even) is streamed in
// two rows at a time, stored whole in the array block, and then swept by the
// processor, which produces two integral values ii(x,y) and ii(x+1,y) per clock
// while it fills the integral image memory. Data path:
//
//   input block -> array -> processor <-> memory
//                                 |
//                                 +--> output block -> out1, out2, col, ...
//
// Timing: with pairs offered on consecutive clocks, the last output pair of an
// M x N image leaves M*N + 5 clocks after the first input pair is offered:
// M*N/2 clocks of loading, seven clocks of pipeline between the last input and
// the first output, and M*N/2 clocks of results.
//
// The five-block structure, the port names of the input and output blocks,
// the two-row equations and the M*N + 5 clock schedule follow the published
// two-row method and its 10 MHz ASIC implementation. The valid/ready handshake,
// run-time frame size, the extra output flags and the memory's second read port
// (mem_rd_*, for the stage that consumes the integral image) are this design's
// own additions.
module ii_top #(
  parameter int unsigned MAX_DIM = ii_pkg::MAX_DIM_DEF,
  parameter int unsigned PIX_W   = ii_pkg::PIX_W_DEF,
  parameter int unsigned II_W    = ii_pkg::II_W_DEF,
  parameter int unsigned DIM_W   = $clog2(MAX_DIM + 1),
  parameter int unsigned IDX_W   = $clog2(MAX_DIM)
) (
  input  logic             clk,
  input  logic             rst_n,
  // input block
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [PIX_W-1:0] input1,
  input  logic [PIX_W-1:0] input2,
  input  logic [DIM_W-1:0] height,
  input  logic [DIM_W-1:0] width,
  // output block
  output logic             out_valid,
  output logic [II_W-1:0]  out1,
  output logic [II_W-1:0]  out2,
  output logic [IDX_W-1:0] col,
  output logic [IDX_W-1:0] row,
  output logic [DIM_W-1:0] out_height,
  output logic [DIM_W-1:0] out_width,
  output logic             frame_done,
  // integral image read port
  input  logic [IDX_W-1:0] mem_rd_row,
  input  logic [IDX_W-1:0] mem_rd_col,
  output logic [II_W-1:0]  mem_rd_data
);

  // The word must hold the largest integral value of a full-size frame.
  initial assert (II_W >= ii_pkg::ii_bits(MAX_DIM, MAX_DIM, PIX_W))
    else $error("II_W=%0d is too narrow for %0dx%0d", II_W, MAX_DIM, MAX_DIM);

  logic             wr_valid;
  logic [PIX_W-1:0] wr_pix1, wr_pix2;
  logic [DIM_W-1:0] wr_height, wr_width;
  logic             xfer_done;

  logic             mem_we;
  logic [IDX_W-1:0] mem_wr_pair, mem_wr_col;
  logic [II_W-1:0]  mem_wr_d1, mem_wr_d2;
  logic [IDX_W-1:0] p_rd_row, p_rd_col;
  logic [II_W-1:0]  p_rd_data;

  ii_pair_if #(.DW(PIX_W), .IDX_W(IDX_W), .DIM_W(DIM_W)) pix_bus ();
  ii_pair_if #(.DW(II_W),  .IDX_W(IDX_W), .DIM_W(DIM_W)) ii_bus ();

  ii_input_block #(.MAX_DIM(MAX_DIM), .PIX_W(PIX_W), .DIM_W(DIM_W)) u_input (
    .clk, .rst_n, .in_valid, .in_ready, .input1, .input2, .height, .width,
    .xfer_done, .wr_valid, .wr_pix1, .wr_pix2, .wr_height, .wr_width
  );

  ii_array #(.MAX_DIM(MAX_DIM), .PIX_W(PIX_W), .DIM_W(DIM_W), .IDX_W(IDX_W)) u_array (
    .clk, .rst_n, .wr_valid, .wr_pix1, .wr_pix2, .wr_height, .wr_width,
    .xfer_done, .pout(pix_bus)
  );

  ii_processor #(.MAX_DIM(MAX_DIM), .PIX_W(PIX_W), .II_W(II_W), .DIM_W(DIM_W),
                 .IDX_W(IDX_W)) u_proc (
    .clk, .rst_n, .pin(pix_bus), .pout(ii_bus),
    .mem_we, .mem_wr_pair, .mem_wr_col, .mem_wr_d1, .mem_wr_d2,
    .mem_rd_row(p_rd_row), .mem_rd_col(p_rd_col), .mem_rd_data(p_rd_data)
  );

  ii_memory #(.MAX_DIM(MAX_DIM), .II_W(II_W), .IDX_W(IDX_W)) u_mem (
    .clk, .we(mem_we), .wr_pair(mem_wr_pair), .wr_col(mem_wr_col),
    .wr_d1(mem_wr_d1), .wr_d2(mem_wr_d2),
    .ra_row(p_rd_row), .ra_col(p_rd_col), .ra_data(p_rd_data),
    .rb_row(mem_rd_row), .rb_col(mem_rd_col), .rb_data(mem_rd_data)
  );

  ii_output_block #(.MAX_DIM(MAX_DIM), .II_W(II_W), .DIM_W(DIM_W), .IDX_W(IDX_W)) u_output (
    .clk, .rst_n, .pin(ii_bus), .out_valid, .out1, .out2, .col, .row,
    .height(out_height), .width(out_width), .frame_done
  );

endmodule
