// tb_sobel_mem_writer: self-checking test of the result writer. Frames of
// random words are streamed in with random gaps while the memory port stalls
// at random. The test checks that the memory receives every word once, in
// order, at base, base+1, ..., that done rises only after the last word has
// been accepted by memory and stays high, and that with an always-ready
// memory one word is written per clock.
module tb_sobel_mem_writer;
  localparam int unsigned DW = 64, AW = 32;
  logic clk = 0, rst_n = 0;
  logic start, done, in_valid, in_ready, in_last, wr_valid, wr_ready;
  logic [AW-1:0] base, wr_addr;
  logic [DW-1:0] in_data, wr_data;
  int checks = 0, failures = 0, cycle = 0;

  sobel_mem_writer #(.DATA_W(DW), .ADDR_W(AW)) dut (.*);

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

  logic [DW-1:0] q[$];
  int n_total = 0, n_sent = 0, n_written = 0, t_first = 0, t_last = 0;
  logic [AW-1:0] exp_addr;
  bit rnd = 1, stuck = 0, last_written = 0;

  always @(negedge clk) begin
    if (rst_n && !stuck) begin
      if (n_sent < n_total && (!rnd || $urandom_range(0, 3) != 0)) begin
        in_data  <= {$urandom, $urandom};
        in_last  <= (n_sent == n_total - 1);
        in_valid <= 1'b1;
      end else in_valid <= 1'b0;
    end
    wr_ready <= rnd ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      check(done == last_written, "done exactly after the last write");
      if (wr_valid && wr_ready) begin
        check(q.size() > 0, "no extra write");
        if (q.size() > 0) check(wr_data == q.pop_front(), "write data in order");
        check(wr_addr == exp_addr, "consecutive addresses from base");
        exp_addr++;
        n_written++;
        if (n_written == 1) t_first = cycle;
        t_last = cycle;
        if (n_written == n_total) last_written = 1;
      end
      if (in_valid && in_ready) begin
        q.push_back(in_data);
        n_sent++;
      end
      stuck = in_valid && !in_ready;
    end
  end

  task automatic frame(input logic [AW-1:0] b, input int n, input bit r);
    rnd = r;
    @(negedge clk);
    base = b; start = 1; exp_addr = b;
    @(negedge clk);
    start = 0;
    last_written = 0; n_written = 0; n_sent = 0; n_total = n;
    while (!(last_written && done)) @(negedge clk);
    repeat (5) @(negedge clk);
    check(n_written == n && q.size() == 0, "every word written once");
  endtask

  initial begin
    start = 0; base = '0; in_valid = 0; in_data = '0; in_last = 0; wr_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    frame(32'h4000, 300, 1);
    frame(32'h10, 1, 1);
    frame(32'hFFFF_FF00, 500, 1);
    frame(32'h8000, 400, 0);
    $display("400 words written in %0d clocks", t_last - t_first + 1);
    check(t_last - t_first + 1 == 400, "one word per clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
