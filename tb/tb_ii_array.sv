// tb_ii_array: checks the image store and its two-row read-out.
//
// Writes frames of random pixels pair by pair (with idle clocks between
// writes), then checks that the array emits one beat per clock in row-pair,
// column order, starting two clocks after the last write, with the right
// pixels, pair/col indices, frame size and last flag, and that xfer_done is
// high exactly in the clock before the last beat.
module tb_ii_array;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned MAX_DIM = 10;
  localparam int unsigned PIX_W   = 8;
  localparam int unsigned DIM_W   = 4;
  localparam int unsigned IDX_W   = 4;

  logic clk = 0, rst_n = 0;
  logic wr_valid = 0;
  logic [PIX_W-1:0] wr_pix1 = 0, wr_pix2 = 0;
  logic [DIM_W-1:0] wr_height = 0, wr_width = 0;
  logic xfer_done;

  ii_pair_if #(.DW(PIX_W), .IDX_W(IDX_W), .DIM_W(DIM_W)) pbus ();
  ii_array #(.MAX_DIM(MAX_DIM), .PIX_W(PIX_W), .DIM_W(DIM_W), .IDX_W(IDX_W)) dut (
    .clk, .rst_n, .wr_valid, .wr_pix1, .wr_pix2, .wr_height, .wr_width,
    .xfer_done, .pout(pbus));

  always #50 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  int unsigned img [MAX_DIM][MAX_DIM];

  task automatic frame(input int h, input int w);
    for (int x = 0; x < h; x++) for (int y = 0; y < w; y++) img[x][y] = $urandom % 256;
    for (int p = 0; p < h / 2; p++)
      for (int y = 0; y < w; y++) begin
        while ($urandom % 3 == 0) begin wr_valid = 0; @(negedge clk); end
        wr_valid = 1; wr_pix1 = PIX_W'(img[2*p][y]); wr_pix2 = PIX_W'(img[2*p+1][y]);
        wr_height = DIM_W'(h); wr_width = DIM_W'(w);
        check(pbus.valid == 0, "beat during load");
        @(negedge clk);
      end
    wr_valid = 0;
    // one clock to change phase: the read is being issued now
    check(pbus.valid == 0, "beat one clock after last write");
    for (int p = 0; p < h / 2; p++)
      for (int y = 0; y < w; y++) begin
        bit lst;
        lst = (p == h / 2 - 1) && (y == w - 1);
        check(xfer_done == lst, "xfer_done timing");
        @(negedge clk);
        check(pbus.valid == 1, $sformatf("beat %0d,%0d missing", p, y));
        check(pbus.d1 == PIX_W'(img[2*p][y]) && pbus.d2 == PIX_W'(img[2*p+1][y]),
              $sformatf("pixels at pair %0d col %0d", p, y));
        check(32'(pbus.pair) == p && 32'(pbus.col) == y, "indices");
        check(32'(pbus.height) == h && 32'(pbus.width) == w, "size");
        check(pbus.last == lst, "last flag");
      end
    @(negedge clk);
    check(pbus.valid == 0 && xfer_done == 0, "extra beat");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    frame(2, 2); frame(10, 10); frame(4, 7); frame(2, 1); frame(8, 8); frame(6, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
