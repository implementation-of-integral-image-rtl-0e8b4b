// tb_ii_processor: checks the two-row integral datapath with its memory.
//
// Feeds pixel beats of random frames straight into the processor (one beat
// per clock within a frame, frames back to back and with idle gaps), with an
// ii_memory attached, and compares every output beat with an integral image
// computed here by direct summation. Each beat must leave exactly three clocks
// after it entered. The memory contents are read back at the end of a frame.
module tb_ii_processor;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned MAX_DIM = 10;
  localparam int unsigned PIX_W   = 8;
  localparam int unsigned II_W    = 15;
  localparam int unsigned DIM_W   = 4;
  localparam int unsigned IDX_W   = 4;

  logic clk = 0, rst_n = 0;
  logic mem_we;
  logic [IDX_W-1:0] mem_wr_pair, mem_wr_col, mem_rd_row, mem_rd_col;
  logic [II_W-1:0] mem_wr_d1, mem_wr_d2, mem_rd_data;
  logic [IDX_W-1:0] rb_row = 0, rb_col = 0;
  logic [II_W-1:0] rb_data;

  ii_pair_if #(.DW(PIX_W), .IDX_W(IDX_W), .DIM_W(DIM_W)) pbus ();
  ii_pair_if #(.DW(II_W),  .IDX_W(IDX_W), .DIM_W(DIM_W)) ibus ();

  ii_processor #(.MAX_DIM(MAX_DIM), .PIX_W(PIX_W), .II_W(II_W), .DIM_W(DIM_W),
                 .IDX_W(IDX_W)) dut (
    .clk, .rst_n, .pin(pbus), .pout(ibus), .mem_we, .mem_wr_pair, .mem_wr_col,
    .mem_wr_d1, .mem_wr_d2, .mem_rd_row, .mem_rd_col, .mem_rd_data);

  ii_memory #(.MAX_DIM(MAX_DIM), .II_W(II_W), .IDX_W(IDX_W)) u_mem (
    .clk, .we(mem_we), .wr_pair(mem_wr_pair), .wr_col(mem_wr_col), .wr_d1(mem_wr_d1),
    .wr_d2(mem_wr_d2), .ra_row(mem_rd_row), .ra_col(mem_rd_col), .ra_data(mem_rd_data),
    .rb_row, .rb_col, .rb_data);

  always #50 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

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

  typedef struct { int unsigned ii1, ii2, p, y; bit last; longint t; } beat_t;
  beat_t exp_q[$];
  int unsigned img [MAX_DIM][MAX_DIM];
  int unsigned rf [MAX_DIM][MAX_DIM];

  always @(negedge clk) if (rst_n && ibus.valid) begin
    beat_t e;
    if (exp_q.size() == 0) check(0, "unexpected beat");
    else begin
      e = exp_q.pop_front();
      check(ibus.d1 == II_W'(e.ii1) && ibus.d2 == II_W'(e.ii2),
            $sformatf("ii pair %0d col %0d: %0d/%0d exp %0d/%0d", e.p, e.y, ibus.d1, ibus.d2,
                      e.ii1, e.ii2));
      check(32'(ibus.pair) == e.p && 32'(ibus.col) == e.y && ibus.last == e.last, "indices");
      check(cyc - e.t == 3, $sformatf("latency %0d", cyc - e.t));
    end
  end

  task automatic frame(input int h, input int w, input int fill);
    for (int x = 0; x < h; x++)
      for (int y = 0; y < w; y++) img[x][y] = (fill >= 0) ? fill : $urandom % 256;
    for (int x = 0; x < h; x++)
      for (int y = 0; y < w; y++) begin
        rf[x][y] = img[x][y] + (x > 0 ? rf[x-1][y] : 0) + (y > 0 ? rf[x][y-1] : 0)
                   - ((x > 0 && y > 0) ? rf[x-1][y-1] : 0);
      end
    for (int p = 0; p < h / 2; p++)
      for (int y = 0; y < w; y++) begin
        beat_t e;
        e.ii1 = rf[2*p][y]; e.ii2 = rf[2*p+1][y]; e.p = p; e.y = y;
        e.last = (p == h / 2 - 1 && y == w - 1); e.t = cyc;
        exp_q.push_back(e);
        pbus.valid = 1; pbus.d1 = PIX_W'(img[2*p][y]); pbus.d2 = PIX_W'(img[2*p+1][y]);
        pbus.pair = IDX_W'(p); pbus.col = IDX_W'(y); pbus.height = DIM_W'(h);
        pbus.width = DIM_W'(w); pbus.last = e.last;
        @(negedge clk);
      end
    pbus.valid = 0; pbus.last = 0;
  endtask

  task automatic check_mem(input int h, input int w);
    repeat (4) @(negedge clk);
    for (int x = 0; x < h; x++)
      for (int y = 0; y < w; y++) begin
        rb_row = IDX_W'(x); rb_col = IDX_W'(y);
        #1;
        check(rb_data == II_W'(rf[x][y]), "memory content");
      end
  endtask

  initial begin
    pbus.valid = 0; pbus.d1 = 0; pbus.d2 = 0; pbus.pair = 0; pbus.col = 0;
    pbus.height = 0; pbus.width = 0; pbus.last = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    frame(2, 2, -1); check_mem(2, 2);
    frame(10, 10, -1); check_mem(10, 10);
    frame(10, 10, 255); check_mem(10, 10);
    frame(4, 1, -1);        // one column: no gap between pairs at the same column
    frame(6, 9, -1);
    frame(8, 2, -1); check_mem(8, 2);
    repeat (5) @(negedge clk);
    check(exp_q.size() == 0, "beats missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
