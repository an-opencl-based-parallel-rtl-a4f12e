// sobel_accel_harness: end-to-end test bench body for sobel_accel, shared by
// the reduced test (FULL = 0) and the full-size test (FULL = 1).
//
// It plays host and global memory: it builds a test picture in a memory model,
// configures and starts the accelerator, and serves its read port (in-order
// responses after a random latency) and both write ports. Every word written
// back is compared, as it arrives, with a reference computed from the picture
// in sobel_ref_pkg: the edge map bit-exactly, the orientation within one
// half-degree unit, padding lanes zero. Each result word must be written
// exactly once, at the right address, and done must follow the last write.
//
// FULL = 0 runs a set of small frames (widths that are and are not whole
// words, a one-row frame, back-to-back frames) with random stalls on every
// memory port and, in one frame, both write ports held off for 200 clocks so
// that back-pressure reaches the reader. It counts each mechanism of the
// design: memory read and write stalls, requests held back by the reader's
// FIFO credit, windows stalled by full channels, channels running full, the
// line-buffer flush, padding lanes, border pixels, edge and non-edge pixels,
// orientation of flat areas. A
// mechanism that never happens counts as a failure. It also runs a frame
// without stalls and checks the rate of VEC pixels per clock.
// FULL = 1 runs, with all design parameters at their defaults, the nine image
// sizes of the evaluation, from 144x256 to 3480x5760 pixels (rows x columns),
// with an always-ready memory, and checks every pixel and the rate.
module sobel_accel_harness #(parameter bit FULL = 1'b0);
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int unsigned AW = ADDR_W;
  localparam logic [AW-1:0] SRC_BASE  = 32'h0010_0000;
  localparam logic [AW-1:0] EDGE_BASE = 32'h0100_0000;
  localparam logic [AW-1:0] DIR_BASE  = 32'h0200_0000;

  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [AW-1:0] src_base, edge_base, dir_base;
  logic [DIM_W-1:0] width, height;
  logic [MAG_W-1:0] threshold;
  logic rd_req_valid, rd_req_ready, rd_resp_valid;
  logic [AW-1:0] rd_req_addr;
  logic [VEC*PIX_W-1:0] rd_resp_data;
  logic we_valid, we_ready, wd_valid, wd_ready;
  logic [AW-1:0] we_addr, wd_addr;
  logic [VEC*PIX_W-1:0] we_data;
  logic [VEC*ANG_W-1:0] wd_data;

  sobel_accel dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  initial begin : watchdog
    repeat (FULL ? 6_000_000 : 200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- picture and reference ----------------
  byte unsigned img[];
  int W, H, WW, THR;
  byte unsigned n_edge_wr[], n_dir_wr[];

  function automatic logic [VEC*PIX_W-1:0] src_word(input int idx);
    int r, c;
    logic [VEC*PIX_W-1:0] w;
    r = idx / WW; c = idx % WW;
    for (int l = 0; l < int'(VEC); l++)
      w[l*PIX_W +: PIX_W] = (c*VEC + l < W) ? img[r*W + c*VEC + l] : 8'hA5;  // padding lanes hold junk
    return w;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_rd_stall = 0, n_credit_hold = 0, n_win_stall = 0, n_chan_full = 0;
  int n_we_stall = 0, n_wd_stall = 0, n_flush = 0, n_pad = 0, n_border = 0;
  int n_edge = 0, n_noedge = 0, n_flat_dir = 0, n_frames = 0;

  always @(posedge clk) if (rst_n) begin
    if (rd_req_valid && !rd_req_ready) n_rd_stall++;
    if (dut.u_reader.busy && !rd_req_valid) n_credit_hold++;
    if (dut.w_valid && !dut.w_ready) n_win_stall++;
    if (int'(dut.lvl_xm) == int'(dut.CH_DEPTH) || int'(dut.lvl_xd) == int'(dut.CH_DEPTH) ||
        int'(dut.lvl_ym) == int'(dut.CH_DEPTH) || int'(dut.lvl_yd) == int'(dut.CH_DEPTH)) n_chan_full++;
    if (we_valid && !we_ready) n_we_stall++;
    if (wd_valid && !wd_ready) n_wd_stall++;
    if (int'(dut.u_win.state) == 2 && dut.u_win.fire) n_flush++;
  end

  // ---------------- memory model ----------------
  bit rnd;
  bit block_writes = 0;   // hold both write ports off: back-pressure reaches the reader
  typedef struct { longint due; int idx; } pend_t;
  pend_t pend[$];
  longint last_due = 0;
  int n_edge_done, n_dir_done;

  always @(negedge clk) begin
    rd_req_ready  <= rnd ? ($urandom_range(0, 4) != 0) : 1'b1;
    we_ready      <= block_writes ? 1'b0 : rnd ? ($urandom_range(0, 3) != 0) : 1'b1;
    wd_ready      <= block_writes ? 1'b0 : rnd ? ($urandom_range(0, 6) != 0) : 1'b1;
    rd_resp_valid <= 1'b0;
    if (pend.size() > 0 && pend[0].due <= cycle) begin
      rd_resp_valid <= 1'b1;
      rd_resp_data  <= src_word(pend[0].idx);
      void'(pend.pop_front());
    end
  end

  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (rd_req_valid && rd_req_ready) begin
      pend_t p;
      longint lat;
      lat = rnd ? longint'($urandom_range(2, 12)) : 4;
      p.idx = int'(rd_req_addr - src_base);
      check(p.idx >= 0 && p.idx < H*WW, "read inside the source image");
      p.due = (cycle + lat > last_due) ? cycle + lat : last_due + 1;
      last_due = p.due;
      pend.push_back(p);
    end
    if (we_valid && we_ready) begin
      int idx, r, c;
      idx = int'(we_addr - edge_base);
      r = idx / WW; c = idx % WW;
      check(idx >= 0 && idx < H*WW, "edge write inside the result image");
      if (idx >= 0 && idx < H*WW) begin
        check(n_edge_wr[idx] == 0, "edge word written once");
        n_edge_wr[idx]++;
        for (int l = 0; l < int'(VEC); l++) begin
          int x;
          byte unsigned want;
          x = c*VEC + l;
          if (x >= W) begin
            want = 0;
            if (!FULL) n_pad++;
          end else begin
            want = ref_edge(ref_gx(img, W, H, x, r), ref_gy(img, W, H, x, r), THR);
            if (x == 0 || r == 0 || x == W-1 || r == H-1) n_border++;
            else if (want != 0) n_edge++;
            else n_noedge++;
          end
          check(we_data[l*PIX_W +: PIX_W] == want, $sformatf("edge pixel (%0d,%0d)", x, r));
        end
      end
      n_edge_done++;
    end
    if (wd_valid && wd_ready) begin
      int idx, r, c;
      idx = int'(wd_addr - dir_base);
      r = idx / WW; c = idx % WW;
      check(idx >= 0 && idx < H*WW, "orientation write inside the result image");
      if (idx >= 0 && idx < H*WW) begin
        check(n_dir_wr[idx] == 0, "orientation word written once");
        n_dir_wr[idx]++;
        for (int l = 0; l < int'(VEC); l++) begin
          int x, gx, gy;
          x = c*VEC + l;
          if (x >= W) begin
            check(wd_data[l*ANG_W +: ANG_W] == 0, "padding orientation is 0");
          end else begin
            gx = ref_gx(img, W, H, x, r);
            gy = ref_gy(img, W, H, x, r);
            if (gx == 0 && gy == 0 && x > 0 && r > 0 && x < W-1 && r < H-1) n_flat_dir++;
            check(angle_ok(int'(wd_data[l*ANG_W +: ANG_W]), gx, gy),
                  $sformatf("orientation (%0d,%0d): got %0d want %f", x, r,
                            wd_data[l*ANG_W +: ANG_W], ref_angle(gx, gy)));
          end
        end
      end
      n_dir_done++;
    end
  end

  // ---------------- one frame ----------------
  task automatic frame(input int w, input int h, input int thr, input bit random_timing,
                       input bit flat_patch, output longint cycles);
    longint t0;
    W = w; H = h; WW = (w + VEC - 1) / VEC; THR = thr; rnd = random_timing;
    img = new[w*h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        img[y*w + x] = (flat_patch && x < 12 && y < 6) ? 8'd77 : test_pixel(x, y, n_frames);
    n_edge_wr = new[h*WW];
    n_dir_wr  = new[h*WW];
    n_edge_done = 0; n_dir_done = 0;
    @(negedge clk);
    src_base = SRC_BASE; edge_base = EDGE_BASE; dir_base = DIR_BASE;
    width = DIM_W'(w); height = DIM_W'(h); threshold = MAG_W'(thr);
    start = 1;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    check(busy, "busy after start");
    while (!done) @(negedge clk);
    cycles = cycle - t0;
    check(n_edge_done == h*WW && n_dir_done == h*WW, "every result word written before done");
    repeat (3) @(negedge clk);
    check(!busy, "idle after done");
    n_frames++;
    $display("frame %0dx%0d (rows x columns): %0d clocks, %0.2f pixels per clock",
             h, w, cycles, real'(w*h) / real'(cycles));
  endtask

  task automatic mech(input string name, input int n);
    $display("  %-28s %0d", name, n);
    check(n > 0, {"mechanism exercised: ", name});
  endtask

  initial begin
    longint cyc;
    start = 0; src_base = '0; edge_base = '0; dir_base = '0; width = '0; height = '0;
    threshold = '0; rd_resp_valid = 0; rd_resp_data = '0; rd_req_ready = 1; we_ready = 1;
    wd_ready = 1; rnd = 0; W = 1; H = 1; WW = 1; THR = 0;
    img = new[1]; n_edge_wr = new[1]; n_dir_wr = new[1];
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    if (!FULL) begin
      frame(37, 12, 300, 1, 1, cyc);    // width not a whole number of words
      frame(64, 9, 150, 1, 0, cyc);
      frame(8, 6, 300, 1, 0, cyc);      // one word per row
      frame(29, 1, 300, 1, 0, cyc);     // one row: border only
      fork                              // writes blocked for 200 clocks mid-frame
        frame(256, 20, 400, 1, 0, cyc);
        begin
          repeat (150) @(negedge clk);
          block_writes = 1;
          repeat (200) @(negedge clk);
          block_writes = 0;
        end
      join
      frame(144, 40, 400, 0, 0, cyc);   // no stalls: rate
      check(cyc <= 40*18 + 18 + 40, "VEC pixels per clock without stalls");
      $display("mechanisms:");
      mech("read-request stalls", n_rd_stall);
      mech("reader credit hold-backs", n_credit_hold);
      mech("window stalls (Conv busy)", n_win_stall);
      mech("channel full", n_chan_full);
      mech("edge write stalls", n_we_stall);
      mech("orientation write stalls", n_wd_stall);
      mech("line-buffer flush words", n_flush);
      mech("padding lanes", n_pad);
      mech("border pixels", n_border);
      mech("edge pixels", n_edge);
      mech("non-edge interior pixels", n_noedge);
      mech("flat-area orientations", n_flat_dir);
    end else begin
      // the nine image sizes of the evaluation, rows x columns
      int rows[9] = '{144, 240, 360, 480, 720, 1080, 1440, 2160, 3480};
      int cols[9] = '{256, 426, 480, 640, 1280, 1920, 2560, 3860, 5760};
      for (int i = 0; i < 9; i++) begin
        int ww;
        ww = (cols[i] + int'(VEC) - 1) / int'(VEC);
        frame(cols[i], rows[i], 400, 0, 0, cyc);
        check(cyc <= longint'(rows[i]*ww + ww + 40),
              $sformatf("%0dx%0d: VEC pixels per clock", rows[i], cols[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
