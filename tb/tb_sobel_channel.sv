// tb_sobel_channel: self-checking test of the kernel-to-kernel channel FIFO.
// Random valid/ready on both sides; a queue scoreboard checks order and
// contents, the level output, that in_ready drops exactly when DEPTH words are
// stored, and that with both sides always active one word passes per clock.
module tb_sobel_channel;
  localparam int unsigned W = 20, D = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(D+1)-1:0] level;
  int checks = 0, failures = 0, cycle = 0;
  logic [W-1:0] q[$];
  int mode;   // 0 random, 1 fill, 2 streaming
  int full_seen = 0, passed_stream = 0;
  bit stuck = 0;   // a word was offered and not taken at the last edge

  sobel_channel #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive on negedge, check on posedge
  always @(negedge clk) begin
    if (rst_n) begin
      if (!stuck) begin   // hold a word that was not taken
        case (mode)
          0: in_valid <= ($urandom_range(0, 2) != 0);
          default: in_valid <= 1'b1;
        endcase
        in_data <= W'($urandom);
      end
      case (mode)
        0: out_ready <= ($urandom_range(0, 2) != 0);
        1: out_ready <= 1'b0;
        default: out_ready <= 1'b1;
      endcase
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      check(int'(level) == q.size(), "level matches stored words");
      check(in_ready == (q.size() < D), "in_ready == not full");
      check(out_valid == (q.size() > 0), "out_valid == not empty");
      if (q.size() == D) full_seen++;
      if (out_valid && out_ready) begin
        check(q.size() > 0 && out_data == q[0], "output word in order");
        if (q.size() > 0) void'(q.pop_front());
        if (mode == 2) passed_stream++;
      end
      if (in_valid && in_ready) q.push_back(in_data);
      stuck = in_valid && !in_ready;
    end
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0; mode = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    mode = 1;                 // fill until full
    repeat (30) @(posedge clk);
    mode = 2;                 // stream: one word per clock
    repeat (200) @(posedge clk);
    check(full_seen > 0, "channel reached full");
    check(passed_stream >= 199, "one word per clock when streaming");
    mode = 0;
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
