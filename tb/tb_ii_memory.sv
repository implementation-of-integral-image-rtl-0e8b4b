// tb_ii_memory: checks the integral image store.
//
// Writes random row-pair words with random idle clocks, keeps a shadow copy,
// and reads every word back through both read ports. Also checks that a read
// of the word being written returns the old value until the clock edge.
module tb_ii_memory;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned MAX_DIM = 10;
  localparam int unsigned II_W    = 15;
  localparam int unsigned IDX_W   = 4;

  logic clk = 0;
  logic we = 0;
  logic [IDX_W-1:0] wr_pair = 0, wr_col = 0, ra_row = 0, ra_col = 0, rb_row = 0, rb_col = 0;
  logic [II_W-1:0] wr_d1 = 0, wr_d2 = 0, ra_data, rb_data;

  ii_memory #(.MAX_DIM(MAX_DIM), .II_W(II_W), .IDX_W(IDX_W)) dut (.*);

  always #50 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned shadow [MAX_DIM][MAX_DIM];

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

  task automatic read_all();
    we = 0;
    for (int x = 0; x < MAX_DIM; x++)
      for (int y = 0; y < MAX_DIM; y++) begin
        ra_row = IDX_W'(x); ra_col = IDX_W'(y);
        rb_row = IDX_W'(MAX_DIM - 1 - x); rb_col = IDX_W'(MAX_DIM - 1 - y);
        #1;
        check(ra_data == II_W'(shadow[x][y]), $sformatf("port A (%0d,%0d)", x, y));
        check(rb_data == II_W'(shadow[MAX_DIM-1-x][MAX_DIM-1-y]), "port B");
      end
  endtask

  initial begin
    @(negedge clk);
    for (int round = 0; round < 3; round++) begin
      for (int p = 0; p < MAX_DIM / 2; p++)
        for (int y = 0; y < MAX_DIM; y++) begin
          int unsigned a, b;
          a = $urandom % (1 << II_W); b = $urandom % (1 << II_W);
          we = 1; wr_pair = IDX_W'(p); wr_col = IDX_W'(y); wr_d1 = II_W'(a); wr_d2 = II_W'(b);
          // read of the word under write shows the old value before the edge
          ra_row = IDX_W'(2 * p + 1); ra_col = IDX_W'(y);
          #1;
          if (round > 0) check(ra_data == II_W'(shadow[2*p+1][y]), "read during write");
          @(negedge clk);
          shadow[2*p][y] = a; shadow[2*p+1][y] = b;
          we = 0;
          if ($urandom % 2) @(negedge clk);
        end
      read_all();
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
