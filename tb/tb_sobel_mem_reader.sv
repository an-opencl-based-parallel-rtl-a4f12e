// tb_sobel_mem_reader: self-checking test of the global-memory reader.
// A memory model answers requests in order after a random latency of 1..6
// clocks and refuses requests at random; the consumer stalls at random. The
// test checks every word and its order, the number of requests, that busy
// falls after the last request, and that with an always-ready memory and
// consumer the reader delivers one word per clock (n words in n + latency + 2
// clocks).
module tb_sobel_mem_reader;
  localparam int unsigned DW = 64, AW = 32, CW = 24, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic start, busy;
  logic [AW-1:0] base;
  logic [CW-1:0] n_words;
  logic rd_req_valid, rd_req_ready, rd_resp_valid;
  logic [AW-1:0] rd_req_addr;
  logic [DW-1:0] rd_resp_data;
  logic out_valid, out_ready;
  logic [DW-1:0] out_data;
  int checks = 0, failures = 0, cycle = 0;
  bit random_mem, random_sink;
  int lat_fixed;

  sobel_mem_reader #(.DATA_W(DW), .ADDR_W(AW), .CNT_W(CW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [DW-1:0] mem_word(input logic [AW-1:0] a);
    return {a ^ 32'hA5A5_0F0F, ~a};
  endfunction

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

  // memory model: in-order responses with random latency
  typedef struct { int due; logic [AW-1:0] a; } pend_t;
  pend_t pend[$];
  int last_due = 0;
  int n_req = 0, n_got = 0;
  logic [AW-1:0] exp_addr;

  always @(negedge clk) begin
    rd_req_ready  <= random_mem ? ($urandom_range(0, 3) != 0) : 1'b1;
    out_ready     <= random_sink ? ($urandom_range(0, 2) != 0) : 1'b1;
    rd_resp_valid <= 1'b0;
    if (pend.size() > 0 && pend[0].due <= cycle) begin
      rd_resp_valid <= 1'b1;
      rd_resp_data  <= mem_word(pend[0].a);
      void'(pend.pop_front());
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      if (rd_req_valid && rd_req_ready) begin
        pend_t p;
        int lat;
        lat = random_mem ? int'($urandom_range(1, 6)) : lat_fixed;
        p.a = rd_req_addr;
        p.due = (cycle + lat > last_due) ? cycle + lat : last_due + 1;
        last_due = p.due;
        pend.push_back(p);
        n_req++;
      end
      if (out_valid && out_ready) begin
        check(out_data == mem_word(exp_addr), "word contents and order");
        exp_addr++;
        n_got++;
      end
    end
  end

  task automatic run(input logic [AW-1:0] b, input int n, input bit rm, input bit rs, output int cycles);
    int t0;
    random_mem = rm; random_sink = rs;
    n_req = 0; n_got = 0; exp_addr = b;
    @(negedge clk);
    base = b; n_words = CW'(n); start = 1;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    while (n_got < n) @(negedge clk);
    cycles = cycle - t0;
    repeat (10) @(negedge clk);
    check(n_req == n, "one request per word");
    check(n_got == n, "every word delivered once");
    check(!busy, "busy low after the frame");
    check(pend.size() == 0, "no request left unanswered");
  endtask

  initial begin
    int cyc;
    start = 0; base = '0; n_words = '0; rd_resp_valid = 0; rd_resp_data = '0;
    rd_req_ready = 1; out_ready = 1; random_mem = 0; random_sink = 0; lat_fixed = 3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(32'h100, 500, 1, 1, cyc);
    run(32'hFFFF_FFF0, 40, 1, 0, cyc);      // address wrap-around
    run(32'h2000, 7, 0, 1, cyc);
    run(32'h3000, 1000, 0, 0, cyc);
    $display("streaming 1000 words took %0d clocks", cyc);
    check(cyc <= 1000 + lat_fixed + 3, "one word per clock with an always-ready memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
