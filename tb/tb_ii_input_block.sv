// tb_ii_input_block: checks the pixel-pair intake.
//
// Sends frames of several sizes with random idle clocks and checks that each
// accepted pair appears on wr_* exactly one clock later with the frame's size,
// that a size change in the middle of a frame is ignored, that in_ready falls
// after height*width/2 pairs, ignores in_valid while low, and rises the clock
// after xfer_done.
module tb_ii_input_block;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned MAX_DIM = 10;
  localparam int unsigned PIX_W   = 8;
  localparam int unsigned DIM_W   = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [PIX_W-1:0] input1 = 0, input2 = 0;
  logic [DIM_W-1:0] height = 0, width = 0;
  logic xfer_done = 0;
  logic wr_valid;
  logic [PIX_W-1:0] wr_pix1, wr_pix2;
  logic [DIM_W-1:0] wr_height, wr_width;

  ii_input_block #(.MAX_DIM(MAX_DIM), .PIX_W(PIX_W), .DIM_W(DIM_W)) dut (.*);

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

  task automatic frame(input int h, input int w);
    for (int k = 0; k < h * w / 2; k++) begin
      logic [PIX_W-1:0] a, b;
      while ($urandom % 4 == 0) begin
        in_valid = 0;
        @(negedge clk);
        check(wr_valid == 0, "wr_valid without accept");
      end
      a = PIX_W'($urandom); b = PIX_W'($urandom);
      in_valid = 1; input1 = a; input2 = b;
      // size lines only matter with the first pair
      height = (k == 0) ? DIM_W'(h) : DIM_W'($urandom % 11);
      width  = (k == 0) ? DIM_W'(w) : DIM_W'($urandom % 11);
      check(in_ready == 1, "in_ready low inside a frame");
      @(negedge clk);
      check(wr_valid && wr_pix1 == a && wr_pix2 == b, $sformatf("pair %0d data", k));
      check(wr_height == DIM_W'(h) && wr_width == DIM_W'(w), "frame size held");
    end
    // frame complete: ready must be low and stay low
    in_valid = 1; input1 = 8'hAA;
    check(in_ready == 0, "in_ready still high after last pair");
    repeat (3) begin
      @(negedge clk);
      check(wr_valid == 0, "pair taken while not ready");
      check(in_ready == 0, "in_ready rose before xfer_done");
    end
    in_valid = 0;
    xfer_done = 1;
    @(negedge clk);
    xfer_done = 0;
    check(in_ready == 1, "in_ready did not rise after xfer_done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(in_ready == 1, "ready after reset");
    frame(2, 2); frame(10, 10); frame(4, 7); frame(2, 1); frame(6, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
