// sobel_channel: a kernel-to-kernel channel, i.e. a synchronous FIFO with a
// valid/ready handshake on both sides.
//
// The kernels of the edge detector pass their results to one another over
// dedicated on-chip buffers instead of going through global memory. This
// module is one such buffer. A word is written when in_valid && in_ready and
// read when out_valid && out_ready; both can happen in the same cycle. The
// storage is a DEPTH-entry array (RAM or registers, at the synthesiser's
// choice) read combinationally at the head, so a word written into an empty
// channel is visible at the output on the next cycle (one cycle latency) and
// the channel sustains one word per clock.
//
// The depth is this design's choice; the original OpenCL design gives none.
module sobel_channel #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 16   // power of two
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic             push, pop;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];
  assign level     = count;

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // A producer must hold its word until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (in_valid && !in_ready) |=> (in_valid && $stable(in_data));
  endproperty
  a_hold: assert property (p_hold) else $error("sobel_channel: producer dropped a word");

endmodule
