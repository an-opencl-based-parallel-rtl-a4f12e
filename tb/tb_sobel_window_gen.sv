// tb_sobel_window_gen: self-checking test of the line-buffer window generator.
// Frames of several sizes (widths that are and are not whole words, one-word
// rows, a one-row image) are streamed in with random input gaps and random
// output stalls. For every window the test checks the interior mask against
// the border/padding rule, every pixel of the 3x3 neighbourhood of each
// interior lane against the picture, the last flag, and the number of windows
// (height * words per row). One frame is run without stalls to check the rate:
// the last window must leave height*ww + ww + 1 clocks (plus two) after start.
module tb_sobel_window_gen;
  import sobel_ref_pkg::*;
  localparam int unsigned VEC = 8, PIX_W = 8, MAXW = 64, DIM_W = 13;
  logic clk = 0, rst_n = 0;
  logic start, busy, in_valid, in_ready, out_valid, out_ready, last;
  logic [DIM_W-1:0] width, height;
  logic [VEC*PIX_W-1:0] in_data;
  logic [2:0][VEC+1:0][PIX_W-1:0] win;
  logic [VEC-1:0] interior;
  int checks = 0, failures = 0, cycle = 0;

  sobel_window_gen #(.VEC(VEC), .PIX_W(PIX_W), .MAX_WIDTH(MAXW), .DIM_W(DIM_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned img[];
  int W, H, WW;
  bit rnd;
  int n_in, n_out, t_last;
  bit stuck = 0;   // a word was offered and not taken at the last edge

  function automatic byte unsigned px(input int x, input int y);
    return img[y*W + x];
  endfunction

  // source: words of the padded rows, random gaps
  always @(negedge clk) begin
    if (rst_n && !stuck) begin
      if (n_in < H*WW && (!rnd || $urandom_range(0, 3) != 0)) begin
        int r, c;
        r = n_in / WW; c = n_in % WW;
        for (int l = 0; l < int'(VEC); l++)
          in_data[l*PIX_W +: PIX_W] <= (c*VEC + l < W) ? px(c*VEC + l, r) : 8'hEE;
        in_valid <= 1'b1;
      end else begin
        in_valid <= 1'b0;
      end
    end
    out_ready <= rnd ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      if (in_valid && in_ready) n_in++;
      stuck = in_valid && !in_ready;
      if (out_valid && out_ready) begin
        int r, c;
        r = n_out / WW; c = n_out % WW;
        for (int l = 0; l < int'(VEC); l++) begin
          int x;
          bit is_in;
          x = c*VEC + l;
          is_in = (r >= 1) && (r <= H-2) && (x >= 1) && (x <= W-2);
          check(interior[l] == is_in, $sformatf("interior r%0d x%0d", r, x));
          if (is_in)
            for (int dy = -1; dy <= 1; dy++)
              for (int dx = -1; dx <= 1; dx++)
                check(win[dy+1][l+1+dx] == px(x+dx, r+dy),
                      $sformatf("pixel (%0d,%0d) of window r%0d x%0d", dx, dy, r, x));
        end
        check(last == (n_out == H*WW - 1), "last flag");
        n_out++;
        t_last = cycle;
      end
    end
  end

  task automatic frame(input int w, input int h, input bit random_timing, output int cycles);
    int t0;
    W = w; H = h; WW = (w + VEC - 1) / VEC; rnd = random_timing;
    img = new[w*h];
    foreach (img[i]) img[i] = byte'($urandom);
    n_in = 0; n_out = 0;
    @(negedge clk);
    width = DIM_W'(w); height = DIM_W'(h); start = 1;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    while (busy) @(negedge clk);
    repeat (5) @(negedge clk);
    check(n_in == h*WW, "all input words taken");
    check(n_out == h*WW, "one window per word");
    cycles = t_last - t0;
  endtask

  initial begin
    int cyc;
    start = 0; width = '0; height = '0; in_valid = 0; in_data = '0; out_ready = 1;
    n_in = 0; n_out = 0; W = 1; H = 1; WW = 1; rnd = 0;
    img = new[1];
    repeat (3) @(posedge clk);
    rst_n = 1;
    frame(21, 9, 1, cyc);
    frame(64, 6, 1, cyc);     // full line-buffer width
    frame(8, 5, 1, cyc);      // one word per row
    frame(13, 1, 1, cyc);     // a single row: all border
    frame(30, 4, 1, cyc);
    frame(40, 10, 0, cyc);
    $display("40x10 frame: last window %0d clocks after start", cyc);
    check(cyc <= 10*5 + 5 + 1 + 2, "one word per clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
