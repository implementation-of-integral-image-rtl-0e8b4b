// tb_ii_output_block: checks the result port.
//
// Drives random integral-value beats with idle clocks between them and checks
// that each one appears on the outputs one clock later, that row is twice the
// pair index, that frame_done marks only the last beat, and that the data
// outputs hold while out_valid is low.
module tb_ii_output_block;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned MAX_DIM = 10;
  localparam int unsigned II_W    = 15;
  localparam int unsigned DIM_W   = 4;
  localparam int unsigned IDX_W   = 4;

  logic clk = 0, rst_n = 0;
  logic out_valid, frame_done;
  logic [II_W-1:0] out1, out2;
  logic [IDX_W-1:0] col, row;
  logic [DIM_W-1:0] height, width;

  ii_pair_if #(.DW(II_W), .IDX_W(IDX_W), .DIM_W(DIM_W)) ibus ();
  ii_output_block #(.MAX_DIM(MAX_DIM), .II_W(II_W), .DIM_W(DIM_W), .IDX_W(IDX_W)) dut (
    .clk, .rst_n, .pin(ibus), .out_valid, .out1, .out2, .col, .row, .height, .width,
    .frame_done);

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

  initial begin
    logic [II_W-1:0] l1, l2;
    ibus.valid = 0; ibus.d1 = 0; ibus.d2 = 0; ibus.pair = 0; ibus.col = 0;
    ibus.height = 0; ibus.width = 0; ibus.last = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(out_valid == 0 && frame_done == 0, "idle after reset");
    for (int k = 0; k < 300; k++) begin
      logic [II_W-1:0] a, b;
      int p, y, h, w;
      bit lst;
      a = II_W'($urandom); b = II_W'($urandom);
      p = $urandom % 5; y = $urandom % 10; h = 2 * (1 + $urandom % 5); w = 1 + $urandom % 10;
      lst = ($urandom % 8 == 0);
      ibus.valid = 1; ibus.d1 = a; ibus.d2 = b; ibus.pair = IDX_W'(p); ibus.col = IDX_W'(y);
      ibus.height = DIM_W'(h); ibus.width = DIM_W'(w); ibus.last = lst;
      @(negedge clk);
      check(out_valid && out1 == a && out2 == b, "beat data");
      check(32'(row) == 2 * p && 32'(col) == y, "row/col");
      check(32'(height) == h && 32'(width) == w, "size");
      check(frame_done == lst, "frame_done");
      l1 = a; l2 = b;
      if ($urandom % 2) begin
        ibus.valid = 0; ibus.last = 1; ibus.d1 = ~a;
        @(negedge clk);
        check(!out_valid && !frame_done && out1 == l1 && out2 == l2, "hold while idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
