// tb_sobel_magn: self-checking test of the Magn kernel. Random signed
// gradient pairs (including the extremes +-1020 and magnitudes equal to the
// threshold) arrive on two independently-timed channels; the output stalls at
// random. Each output pixel must be 255 exactly when |Gx|+|Gy| > threshold,
// words must come out in order with their last flag, and with everything
// ready a word must pass on every clock.
module tb_sobel_magn;
  import sobel_ref_pkg::*;
  localparam int unsigned VEC = 8, PIX_W = 8, GRAD_W = 12, MAG_W = 12;
  logic clk = 0, rst_n = 0;
  logic [MAG_W-1:0] threshold;
  logic gx_valid, gx_ready, gx_last, gy_valid, gy_ready, out_valid, out_ready, out_last;
  logic [VEC-1:0][GRAD_W-1:0] gx, gy;
  logic [VEC*PIX_W-1:0] edges;
  int checks = 0, failures = 0, cycle = 0;

  sobel_magn #(.VEC(VEC), .PIX_W(PIX_W), .GRAD_W(GRAD_W), .MAG_W(MAG_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int x[VEC]; bit last; } vec_t;
  vec_t xq[$], yq[$];          // words still to send
  vec_t xs[$], ys[$];          // words sent, waiting for the output
  bit rnd = 1, x_stuck = 0, y_stuck = 0;
  int n_out = 0, n_edge = 0, n_flat = 0;

  function automatic int rgrad();
    case ($urandom_range(0, 5))
      0: return 1020;
      1: return -1020;
      2: return int'($urandom_range(0, 60)) - 30;
      default: return int'($urandom_range(0, 2040)) - 1020;
    endcase
  endfunction

  always @(negedge clk) begin
    if (rst_n) begin
      if (!x_stuck) begin
        if (xq.size() > 0 && (!rnd || $urandom_range(0, 3) != 0)) begin
          vec_t v; v = xq.pop_front();
          for (int l = 0; l < int'(VEC); l++) gx[l] <= GRAD_W'(v.x[l]);
          gx_last <= v.last; gx_valid <= 1'b1; xs.push_back(v);
        end else gx_valid <= 1'b0;
      end
      if (!y_stuck) begin
        if (yq.size() > 0 && (!rnd || $urandom_range(0, 3) != 0)) begin
          vec_t v; v = yq.pop_front();
          for (int l = 0; l < int'(VEC); l++) gy[l] <= GRAD_W'(v.x[l]);
          gy_valid <= 1'b1; ys.push_back(v);
        end else gy_valid <= 1'b0;
      end
    end
    out_ready <= rnd ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  vec_t ex[$], ey[$];   // pairs accepted by the kernel
  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      if (out_valid && out_ready) begin
        check(ex.size() > 0, "no extra word");
        if (ex.size() > 0) begin
          vec_t a, b;
          a = ex.pop_front(); b = ey.pop_front();
          for (int l = 0; l < int'(VEC); l++) begin
            byte unsigned want;
            want = ref_edge(a.x[l], b.x[l], int'(threshold));
            check(edges[l*PIX_W +: PIX_W] == want,
                  $sformatf("lane %0d gx=%0d gy=%0d thr=%0d", l, a.x[l], b.x[l], threshold));
            if (want != 0) n_edge++; else n_flat++;
          end
          check(out_last == a.last, "last flag");
        end
        n_out++;
      end
      if (gx_valid && gx_ready) begin
        check(gy_valid && gy_ready, "both channels taken together");
        ex.push_back(xs.pop_front());
      end
      if (gy_valid && gy_ready) ey.push_back(ys.pop_front());
      x_stuck = gx_valid && !gx_ready;
      y_stuck = gy_valid && !gy_ready;
    end
  end

  task automatic batch(input int n, input int thr, input bit r);
    vec_t a, b;
    rnd = r;
    threshold = MAG_W'(thr);
    n_out = 0;
    for (int i = 0; i < n; i++) begin
      for (int l = 0; l < int'(VEC); l++) begin
        a.x[l] = rgrad(); b.x[l] = rgrad();
        if ($urandom_range(0, 7) == 0) begin        // magnitude right at the threshold
          a.x[l] = thr / 2; b.x[l] = -(thr - thr / 2);
        end
      end
      a.last = (i == n - 1); b.last = a.last;
      xq.push_back(a); yq.push_back(b);
    end
    while (n_out < n) @(negedge clk);
  endtask

  initial begin
    int t0;
    gx_valid = 0; gy_valid = 0; gx = '0; gy = '0; gx_last = 0; out_ready = 1; threshold = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    batch(300, 200, 1);
    batch(300, 1000, 1);
    batch(100, 0, 1);
    t0 = cycle;
    batch(200, 400, 0);
    $display("200 words in %0d clocks", cycle - t0);
    check(cycle - t0 <= 200 + 4, "one word per clock");
    check(n_edge > 0 && n_flat > 0, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
