// sobel_magn: the Magn kernel. It joins the Gx and Gy result streams, forms
// the approximate gradient magnitude |Gx| + |Gy| of every lane and compares it
// with a threshold: a pixel whose magnitude exceeds the threshold is an edge
// and is written as 255, any other pixel as 0. The result word of VEC pixels
// goes on to the edge-map writer.
//
// Interface: gx/gy arrive on two channels with valid/ready; a word is taken
// from both at once, when both are valid and the output register is free.
// threshold is a static configuration input (held during a frame).
// Timing: one register stage, one word per clock.
// The magnitude formula and the threshold test follow the original OpenCL design; the
// strict ">" comparison and the 255/0 output coding are this design's choices.
module sobel_magn #(
  parameter int unsigned VEC    = sobel_pkg::VEC,
  parameter int unsigned PIX_W  = sobel_pkg::PIX_W,
  parameter int unsigned GRAD_W = sobel_pkg::GRAD_W,
  parameter int unsigned MAG_W  = sobel_pkg::MAG_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [MAG_W-1:0]            threshold,
  input  logic                        gx_valid,
  output logic                        gx_ready,
  input  logic [VEC-1:0][GRAD_W-1:0]  gx,
  input  logic                        gx_last,
  input  logic                        gy_valid,
  output logic                        gy_ready,
  input  logic [VEC-1:0][GRAD_W-1:0]  gy,
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [VEC*PIX_W-1:0]        edges,
  output logic                        out_last
);
  logic take, free;
  logic [VEC*PIX_W-1:0] e;

  function automatic logic [MAG_W-1:0] absval(input logic [GRAD_W-1:0] g);
    logic signed [GRAD_W-1:0] s;
    s = g;
    return (s < 0) ? MAG_W'(-s) : MAG_W'(s);
  endfunction

  always_comb begin
    logic [MAG_W-1:0] m;
    for (int l = 0; l < int'(VEC); l++) begin
      m = absval(gx[l]) + absval(gy[l]);
      e[l*PIX_W +: PIX_W] = (m > threshold) ? sobel_pkg::EDGE_ON : sobel_pkg::EDGE_OFF;
    end
  end

  assign free     = !out_valid || out_ready;
  assign take     = gx_valid && gy_valid && free;
  assign gx_ready = gy_valid && free;
  assign gy_ready = gx_valid && free;

  always_ff @(posedge clk) begin
    if (!rst_n)    out_valid <= 1'b0;
    else if (free) out_valid <= gx_valid && gy_valid;
  end

  always_ff @(posedge clk) begin
    if (take) begin
      edges    <= e;
      out_last <= gx_last;
    end
  end

endmodule
