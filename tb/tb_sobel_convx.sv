// tb_sobel_convx: self-checking test of the Convx kernel. Random windows
// and interior masks (plus all-0 and all-255 windows for the extremes) go in
// with random gaps; each of the two output channels stalls at random. The
// test checks that both channels receive every result word exactly once and in
// order, that each lane equals the Gx mask of Eq. (1) applied to the window
// (0 for lanes outside the interior), the last flag, and that with both
// channels ready a window is taken on every clock.
module tb_sobel_convx;
  localparam int unsigned VEC = 8, PIX_W = 8, GRAD_W = 12;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_last, out_last;
  logic [2:0][VEC+1:0][PIX_W-1:0] win;
  logic [VEC-1:0] interior;
  logic [1:0] out_valid, out_ready;
  logic [VEC-1:0][GRAD_W-1:0] grad;
  int checks = 0, failures = 0, cycle = 0;

  sobel_convx #(.VEC(VEC), .PIX_W(PIX_W), .GRAD_W(GRAD_W)) dut (.*);

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

  typedef struct { int g[VEC]; bit last; } res_t;
  res_t exp_q[2][$];
  int n_sent = 0, n_total = 0, n_taken = 0;
  bit stuck = 0, rnd = 1;
  int mode;

  function automatic res_t model(input logic [2:0][VEC+1:0][PIX_W-1:0] w,
                                 input logic [VEC-1:0] m, input bit lst);
    res_t r;
    for (int l = 0; l < int'(VEC); l++) begin
      int k;
      k = l + 1;
      if (!m[l]) r.g[l] = 0;
      else r.g[l] = (int'(w[0][k+1]) + 2*int'(w[1][k+1]) + int'(w[2][k+1])) - (int'(w[0][k-1]) + 2*int'(w[1][k-1]) + int'(w[2][k-1]));
    end
    r.last = lst;
    return r;
  endfunction

  always @(negedge clk) begin
    if (rst_n && !stuck) begin
      if (n_sent < n_total && (!rnd || $urandom_range(0, 3) != 0)) begin
        for (int r = 0; r < 3; r++)
          for (int k = 0; k < int'(VEC) + 2; k++)
            win[r][k] <= (mode == 1) ? 8'd0 : (mode == 2) ? 8'd255 :
                         (mode == 3) ? ((k < 2) ? 8'd0 : 8'd255) :
                         (mode == 4) ? ((r == 0) ? 8'd255 : 8'd0) : PIX_W'($urandom);
        interior <= (mode != 0) ? '1 : VEC'($urandom);
        in_last  <= (n_sent == n_total - 1);
        in_valid <= 1'b1;
      end else begin
        in_valid <= 1'b0;
      end
    end
    out_ready[0] <= rnd ? ($urandom_range(0, 2) != 0) : 1'b1;
    out_ready[1] <= rnd ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      for (int c = 0; c < 2; c++) begin
        if (out_valid[c] && out_ready[c]) begin
          check(exp_q[c].size() > 0, "no extra word");
          if (exp_q[c].size() > 0) begin
            res_t e;
            e = exp_q[c].pop_front();
            for (int l = 0; l < int'(VEC); l++)
              check(int'($signed(grad[l])) == e.g[l],
                    $sformatf("channel %0d lane %0d: got %0d want %0d", c, l, $signed(grad[l]), e.g[l]));
            check(out_last == e.last, "last flag");
          end
        end
        if (out_valid[c]) check(out_ready[1-c], "word offered only when both channels can take it");
      end
      if (in_valid && in_ready) begin
        res_t e;
        e = model(win, interior, in_last);
        exp_q[0].push_back(e);
        exp_q[1].push_back(e);
        n_sent++;
        n_taken++;
      end
      stuck = in_valid && !in_ready;
    end
  end

  task automatic batch(input int n, input int m, input bit r);
    mode = m; rnd = r; n_sent = 0; n_total = n;
    while (n_sent < n) @(negedge clk);
    for (int i = 0; i < 100 && (exp_q[0].size() != 0 || exp_q[1].size() != 0); i++)
      @(negedge clk);
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0, "every word reached both channels");
  endtask

  initial begin
    int t0;
    in_valid = 0; in_last = 0; win = '0; interior = '0; out_ready = '1; mode = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    batch(400, 0, 1);
    batch(4, 1, 1);
    batch(4, 2, 1);
    batch(4, 3, 1);
    batch(4, 4, 1);
    t0 = cycle;
    batch(200, 0, 0);
    $display("200 windows in %0d clocks", cycle - t0);
    check(cycle - t0 <= 200 + 8, "one window per clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
