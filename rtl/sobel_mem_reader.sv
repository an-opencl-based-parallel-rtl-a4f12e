// sobel_mem_reader: the single task that reads the input image from global
// memory and hands it to the rest of the pipeline.
//
// Only this block touches the source image in global memory; every other
// kernel receives its data over on-chip channels. After a start pulse it
// issues n_words read requests for consecutive word addresses base,
// base+1, ... Each word carries VEC pixels (coalesced, vectorised access).
// Memory answers in order, one rd_resp_valid pulse per request, after any
// latency and without backpressure. Responses land in a FIFO channel whose
// output is the block's output stream. The block keeps a count of requests in
// flight and issues a request only while in-flight requests plus buffered words
// are below the FIFO depth, so a response never finds the FIFO full.
// With a memory that accepts a request per cycle and a consumer that is always
// ready, it delivers one word per clock.
//
// Interface: start pulse with base/n_words sampled at start; busy stays high
// until the last request has been issued. The request/response protocol and
// the FIFO depth are this design's choices; a single reader feeding every other
// kernel follows the original OpenCL design.
module sobel_mem_reader #(
  parameter int unsigned DATA_W = sobel_pkg::VEC * sobel_pkg::PIX_W,
  parameter int unsigned ADDR_W = sobel_pkg::ADDR_W,
  parameter int unsigned CNT_W  = 24,
  parameter int unsigned DEPTH  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  input  logic [CNT_W-1:0]  n_words,
  output logic              busy,
  // global-memory read port
  output logic              rd_req_valid,
  input  logic              rd_req_ready,
  output logic [ADDR_W-1:0] rd_req_addr,
  input  logic              rd_resp_valid,
  input  logic [DATA_W-1:0] rd_resp_data,
  // pixel-word stream
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data
);
  localparam int unsigned LW = $clog2(DEPTH + 1);

  logic [CNT_W-1:0]  left;
  logic [ADDR_W-1:0] addr;
  logic [LW-1:0]     inflight, level;
  logic              issue, fifo_ready;

  // space is counted in words: buffered + in flight must stay below DEPTH
  assign rd_req_valid = (left != '0) && ((LW+1)'(inflight) + (LW+1)'(level) < (LW+1)'(DEPTH));
  assign rd_req_addr  = addr;
  assign issue        = rd_req_valid && rd_req_ready;
  assign busy         = (left != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left     <= '0;
      addr     <= '0;
      inflight <= '0;
    end else begin
      if (start && left == '0) begin
        left <= n_words;
        addr <= base;
      end else if (issue) begin
        left <= left - 1'b1;
        addr <= addr + 1'b1;
      end
      case ({issue, rd_resp_valid})
        2'b10:   inflight <= inflight + 1'b1;
        2'b01:   inflight <= inflight - 1'b1;
        default: inflight <= inflight;
      endcase
    end
  end

  sobel_channel #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid (rd_resp_valid), .in_ready (fifo_ready), .in_data (rd_resp_data),
    .out_valid, .out_ready, .out_data,
    .level
  );

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    rd_resp_valid |-> fifo_ready) else $error("sobel_mem_reader: response FIFO overflow");
  a_no_spurious: assert property (@(posedge clk) disable iff (!rst_n)
    rd_resp_valid |-> (inflight != '0)) else $error("sobel_mem_reader: response without request");

endmodule
