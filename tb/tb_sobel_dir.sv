// tb_sobel_dir: self-checking test of the Dir kernel. Random gradient pairs
// (plus the special cases: both zero, only Gx, only Gy, |Gx| = |Gy|, extremes
// +-1020) arrive on two independently-timed channels; the output stalls at
// random. Every lane must be within one half-degree unit of
// atan(|Gy|/|Gx|) computed in real arithmetic (0 when both are zero), words
// must come out in order with their last flag, the latency from taking a word
// to presenting the result must be NIT+2 clocks, and with everything ready a
// word must pass on every clock.
module tb_sobel_dir;
  import sobel_ref_pkg::*;
  localparam int unsigned VEC = 8, GRAD_W = 12, ANG_W = 8, NIT = 12;
  logic clk = 0, rst_n = 0;
  logic gx_valid, gx_ready, gx_last, gy_valid, gy_ready, out_valid, out_ready, out_last;
  logic [VEC-1:0][GRAD_W-1:0] gx, gy;
  logic [VEC-1:0][ANG_W-1:0] angle;
  int checks = 0, failures = 0, cycle = 0;

  sobel_dir #(.VEC(VEC), .GRAD_W(GRAD_W), .ANG_W(ANG_W), .NIT(NIT)) dut (.*);

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

  typedef struct { int x[VEC]; bit last; int t; } vec_t;
  vec_t xq[$], yq[$], xs[$], ys[$], ex[$], ey[$];
  bit rnd = 1, x_stuck = 0, y_stuck = 0;
  int n_out = 0, lat_min = 1 << 30, lat_max = 0;

  function automatic int rgrad();
    case ($urandom_range(0, 6))
      0: return 1020;
      1: return -1020;
      2: return 0;
      3: return int'($urandom_range(0, 20)) - 10;
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

  bit was_valid = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      if (out_valid && !was_valid && ex.size() > 0 && !rnd) begin
        int lat;
        lat = cycle - ex[0].t;
        if (lat < lat_min) lat_min = lat;
        if (lat > lat_max) lat_max = lat;
      end
      if (out_valid && out_ready) begin
        check(ex.size() > 0, "no extra word");
        if (ex.size() > 0) begin
          vec_t a, b;
          a = ex.pop_front(); b = ey.pop_front();
          for (int l = 0; l < int'(VEC); l++)
            check(angle_ok(int'(angle[l]), a.x[l], b.x[l]),
                  $sformatf("lane %0d gx=%0d gy=%0d: got %0d want %f", l, a.x[l], b.x[l],
                            angle[l], ref_angle(a.x[l], b.x[l])));
          check(out_last == a.last, "last flag");
        end
        n_out++;
      end
      was_valid = out_valid && !out_ready;
      if (gx_valid && gx_ready) begin
        vec_t v;
        check(gy_valid && gy_ready, "both channels taken together");
        v = xs.pop_front(); v.t = cycle; ex.push_back(v);
      end
      if (gy_valid && gy_ready) ey.push_back(ys.pop_front());
      x_stuck = gx_valid && !gx_ready;
      y_stuck = gy_valid && !gy_ready;
    end
  end

  task automatic batch(input int n, input bit r);
    vec_t a, b;
    rnd = r;
    n_out = 0;
    for (int i = 0; i < n; i++) begin
      for (int l = 0; l < int'(VEC); l++) begin
        a.x[l] = rgrad(); b.x[l] = rgrad();
        if (l == 7) b.x[l] = a.x[l];                 // 45 degrees
      end
      a.last = (i == n - 1); b.last = a.last;
      xq.push_back(a); yq.push_back(b);
    end
    while (n_out < n) @(negedge clk);
  endtask

  initial begin
    int t0;
    gx_valid = 0; gy_valid = 0; gx = '0; gy = '0; gx_last = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    batch(600, 1);
    // single word, nothing else in flight: measure latency
    rnd = 0;
    repeat (20) @(negedge clk);
    batch(1, 0);
    repeat (20) @(negedge clk);
    $display("latency %0d..%0d clocks", lat_min, lat_max);
    check(lat_min == NIT + 2 && lat_max == NIT + 2, "latency NIT+2 clocks");
    t0 = cycle;
    batch(200, 0);
    $display("200 words in %0d clocks", cycle - t0);
    check(cycle - t0 <= 200 + NIT + 4, "one word per clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
