// tb_ii_top: end-to-end test of the integral image core at its default size.
//
// Streams a series of frames through ii_top: the five square sizes 2x2 .. 10x10,
// a 10x10 frame of all-255 pixels (largest integral value, 25500), and frames
// of other legal shapes (one column wide, non-square). Pixels are random. A
// reference integral image, computed here by direct summation over the
// rectangle, is compared with every out1/out2 beat, with col, row, the echoed
// height/width, frame_done, and with the whole memory read back through the
// second read port.
//
// Timing: for a frame whose pairs are offered on consecutive clocks into an
// idle core, the last output must leave M*N + 5 clocks after the first input
// (900 ns .. 10500 ns at 100 ns per clock for 2x2 .. 10x10).
//
// Mechanisms that must each occur at least once: back-pressure (in_valid held
// while in_ready is low), gaps in the input stream, a frame loaded while the
// previous one is still being output, a change of frame size, and a frame at
// the largest value.
module tb_ii_top;
  timeunit 1ns; timeprecision 1ps;
  import ii_pkg::*;

  localparam int unsigned MAX_DIM = MAX_DIM_DEF;
  localparam int unsigned PIX_W   = PIX_W_DEF;
  localparam int unsigned II_W    = II_W_DEF;
  localparam int unsigned DIM_W   = $clog2(MAX_DIM + 1);
  localparam int unsigned IDX_W   = $clog2(MAX_DIM);

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             in_valid = 1'b0;
  logic             in_ready;
  logic [PIX_W-1:0] input1 = '0, input2 = '0;
  logic [DIM_W-1:0] height = '0, width = '0;
  logic             out_valid;
  logic [II_W-1:0]  out1, out2;
  logic [IDX_W-1:0] col, row;
  logic [DIM_W-1:0] out_height, out_width;
  logic             frame_done;
  logic [IDX_W-1:0] mem_rd_row = '0, mem_rd_col = '0;
  logic [II_W-1:0]  mem_rd_data;

  ii_top dut (.*);

  always #50 clk = ~clk;   // 100 ns clock

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // Expected output beats.
  typedef struct {
    int unsigned ii1, ii2, x, y, h, w;
    bit last;
    int frame;
  } beat_t;
  beat_t exp_q[$];

  int unsigned img [MAX_DIM][MAX_DIM];
  int unsigned ref_ii [MAX_DIM][MAX_DIM];

  function automatic void make_ref(int unsigned h, int unsigned w);
    for (int x = 0; x < int'(h); x++)
      for (int y = 0; y < int'(w); y++) begin
        int unsigned s = 0;
        for (int a = 0; a <= x; a++)
          for (int b = 0; b <= y; b++) s += img[a][b];
        ref_ii[x][y] = s;
      end
  endfunction

  // mechanism counters
  int n_backpressure = 0, n_gap = 0, n_overlap = 0, n_size_change = 0, n_maxval = 0;
  int n_timed = 0;

  // Output monitor
  longint last_out_cyc;
  int     frames_out = 0;
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      beat_t e;
      last_out_cyc = cyc;
      if (exp_q.size() == 0) check(0, "unexpected output beat");
      else begin
        e = exp_q.pop_front();
        check(out1 == II_W'(e.ii1) && out2 == II_W'(e.ii2),
              $sformatf("frame %0d ii(%0d,%0d)=%0d/%0d exp %0d/%0d", e.frame, e.x, e.y,
                        out1, out2, e.ii1, e.ii2));
        check(32'(col) == e.y && 32'(row) == e.x, "col/row");
        check(32'(out_height) == e.h && 32'(out_width) == e.w, "height/width echo");
        check(frame_done == e.last, "frame_done");
        if (e.last) frames_out++;
      end
    end else begin
      check(frame_done == 1'b0, "frame_done without beat");
    end
  end

  // Drive one frame; gap_rate in percent. Returns the cycle the first pair was offered.
  task automatic send_frame(input int unsigned h, input int unsigned w, input int fill,
                            input int gap_rate, input int frame, output longint t_first);
    // fill: -1 random pixels, -2 keep img as set by the caller, else constant
    if (fill != -2)
      for (int x = 0; x < int'(h); x++)
        for (int y = 0; y < int'(w); y++)
          img[x][y] = (fill >= 0) ? fill : ($urandom % 256);
    make_ref(h, w);
    for (int p = 0; p < int'(h) / 2; p++)
      for (int y = 0; y < int'(w); y++) begin
        beat_t e;
        e.ii1 = ref_ii[2*p][y]; e.ii2 = ref_ii[2*p+1][y];
        e.x = 2*p; e.y = y; e.h = h; e.w = w; e.frame = frame;
        e.last = (p == int'(h) / 2 - 1) && (y == int'(w) - 1);
        exp_q.push_back(e);
      end
    t_first = -1;
    for (int p = 0; p < int'(h) / 2; p++)
      for (int y = 0; y < int'(w); y++) begin
        while (gap_rate > 0 && ($urandom % 100) < gap_rate) begin
          in_valid = 1'b0;
          n_gap++;
          @(negedge clk);
        end
        in_valid = 1'b1;
        input1 = PIX_W'(img[2*p][y]);
        input2 = PIX_W'(img[2*p+1][y]);
        height = DIM_W'(h);
        width  = DIM_W'(w);
        if (t_first < 0) t_first = cyc;
        @(posedge clk);
        while (!in_ready) begin
          n_backpressure++;
          @(posedge clk);
        end
        // Beats of the previous frame still pending while this one loads.
        if (p == 0 && y == 0 && exp_q.size() > h * w / 2) n_overlap++;
        @(negedge clk);
      end
    in_valid = 1'b0;
  endtask

  task automatic wait_idle();
    while (exp_q.size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  task automatic check_memory(input int unsigned h, input int unsigned w);
    for (int x = 0; x < int'(h); x++)
      for (int y = 0; y < int'(w); y++) begin
        mem_rd_row = IDX_W'(x);
        mem_rd_col = IDX_W'(y);
        #1;
        check(mem_rd_data == II_W'(ref_ii[x][y]),
              $sformatf("memory ii(%0d,%0d)=%0d exp %0d", x, y, mem_rd_data, ref_ii[x][y]));
      end
  endtask

  // Frames timed against the document's execution-time table.
  task automatic timed_frame(input int unsigned n, input int fill, input int frame);
    longint t0;
    int unsigned exp_cycles;
    send_frame(n, n, fill, 0, frame, t0);
    wait_idle();
    exp_cycles = n * n + 5;
    check(last_out_cyc - t0 == longint'(exp_cycles),
          $sformatf("%0dx%0d execution time %0d clocks, expected %0d", n, n,
                    last_out_cyc - t0, exp_cycles));
    $display("%0dx%0d: execution time %0d ns", n, n, (last_out_cyc - t0) * 100);
    n_timed++;
    check_memory(n, n);
  endtask

  int frame = 0;
  int unsigned prev_h = 0;
  initial begin
    longint t0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // The document's 2x2 example: first pair (0, 82), last outputs (40, 332)
    // at 900 ns, which fixes the pixels to rows {0, 40} and {82, 210}.
    begin
      longint t_first;
      img[0][0] = 0;  img[0][1] = 40;
      img[1][0] = 82; img[1][1] = 210;
      send_frame(2, 2, -2, 0, frame++, t_first);
      wait_idle();
      check(out1 == 15'd40 && out2 == 15'd332, "document 2x2 example: last outputs 40 and 332");
      check((last_out_cyc - t_first) * 100 == 900, "document 2x2 example: 900 ns");
      prev_h = 2;
    end

    // The five sizes evaluated, each from an idle core.
    for (int n = 2; n <= 10; n += 2) begin
      timed_frame(n, -1, frame++);
      if (prev_h != 0 && n != int'(prev_h)) n_size_change++;
      prev_h = n;
    end
    // Largest value: every pixel 255.
    timed_frame(10, 255, frame++);
    n_maxval++;

    // Other shapes, back to back, with gaps and back-pressure.
    begin
      int unsigned shapes_h [6] = '{2, 4, 10, 6, 8, 2};
      int unsigned shapes_w [6] = '{1, 7, 3, 10, 5, 10};
      for (int k = 0; k < 6; k++) begin
        send_frame(shapes_h[k], shapes_w[k], -1, (k % 2 != 0) ? 20 : 0, frame++, t0);
        n_size_change++;
      end
      wait_idle();
      check_memory(shapes_h[5], shapes_w[5]);
    end

    check(frames_out == frame, $sformatf("frames out %0d of %0d", frames_out, frame));
    $display("mechanisms: backpressure=%0d gaps=%0d overlapped_frames=%0d size_changes=%0d max_value_frames=%0d timed=%0d",
             n_backpressure, n_gap, n_overlap, n_size_change, n_maxval, n_timed);
    check(n_backpressure > 0, "back-pressure never happened");
    check(n_gap > 0, "input gap never happened");
    check(n_overlap > 0, "overlapped frames never happened");
    check(n_size_change > 0, "size change never happened");
    check(n_maxval > 0, "max value frame never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
