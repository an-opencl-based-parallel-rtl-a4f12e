// sobel_mem_writer: writes a result stream back to global memory as whole,
// consecutive words (coalesced writes), VEC pixels per word.
//
// A start pulse loads the base word address. Each word taken from the input
// stream is presented on the write port with the next address, base, base+1,
// ... When the word flagged last has been accepted by memory, done goes high
// and stays high until the next start.
//
// Interface: input stream valid/ready; write port wr_valid/wr_ready (memory may
// stall). Timing: one register stage, one word per clock while memory accepts.
// The write protocol is this design's choice.
module sobel_mem_writer #(
  parameter int unsigned DATA_W = sobel_pkg::VEC * sobel_pkg::PIX_W,
  parameter int unsigned ADDR_W = sobel_pkg::ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  output logic              done,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  input  logic              in_last,
  output logic              wr_valid,
  input  logic              wr_ready,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [DATA_W-1:0] wr_data
);
  logic [ADDR_W-1:0] next_addr;
  logic              wr_last;

  assign in_ready = !wr_valid || wr_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_valid  <= 1'b0;
      done      <= 1'b0;
      next_addr <= '0;
      wr_last   <= 1'b0;
    end else begin
      if (wr_valid && wr_ready && wr_last) done <= 1'b1;
      if (start) begin
        next_addr <= base;
        done      <= 1'b0;
      end else if (in_ready) begin
        wr_valid <= in_valid;
        if (in_valid) begin
          wr_addr   <= next_addr;
          wr_data   <= in_data;
          wr_last   <= in_last;
          next_addr <= next_addr + 1'b1;
        end
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_valid && !wr_ready) |=> (wr_valid && $stable(wr_addr) && $stable(wr_data)))
    else $error("sobel_mem_writer: write changed while stalled");

endmodule
