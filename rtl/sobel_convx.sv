// sobel_convx: the Convx kernel. For each of the VEC pixels of a window it
// computes the horizontal derivative: the mask of Eq. (1), Gx = [-1 0 1; -2 0 2; -1 0 1],
// so Gx = (right column, weights 1 2 1) - (left column, weights 1 2 1).
// The mask is applied as a correlation (mask entry times the pixel under it).
//
// It runs concurrently with the Convy kernel on the same windows and forwards
// every result word over two dedicated channels, one to the Magn kernel and
// one to the Dir kernel, so neither result goes through global memory. A lane
// whose interior bit is clear (border or padding pixel) yields 0.
//
// Timing: one register stage; one window in and one result word out per clock.
// The two outputs form a broadcast: out_valid[i] is raised only when the other
// channel can also take the word, so both receive every word exactly once.
// in_ready is low while a result waits for a full channel (a stall).
// The mask and the two dedicated output channels follow the original OpenCL
// design; the single register stage and the broadcast handshake are this
// design's choices.
module sobel_convx #(
  parameter int unsigned VEC    = sobel_pkg::VEC,
  parameter int unsigned PIX_W  = sobel_pkg::PIX_W,
  parameter int unsigned GRAD_W = sobel_pkg::GRAD_W
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  output logic                               in_ready,
  input  logic [2:0][VEC+1:0][PIX_W-1:0]     win,
  input  logic [VEC-1:0]                     interior,
  input  logic                               in_last,
  output logic [1:0]                         out_valid,   // [0] to Magn, [1] to Dir
  input  logic [1:0]                         out_ready,
  output logic [VEC-1:0][GRAD_W-1:0]         grad,        // signed, per lane
  output logic                               out_last
);
  logic v;
  logic [VEC-1:0][GRAD_W-1:0] g;

  function automatic logic signed [GRAD_W-1:0] gsum(input logic [PIX_W-1:0] a,
                                                     input logic [PIX_W-1:0] b,
                                                     input logic [PIX_W-1:0] c);
    return GRAD_W'(a) + (GRAD_W'(b) << 1) + GRAD_W'(c);
  endfunction

  always_comb begin
    logic [2:0][VEC+1:0][PIX_W-1:0] w;
    w = win;
    for (int l = 0; l < int'(VEC); l++) begin
      g[l] = interior[l] ? (gsum(w[0][l+2], w[1][l+2], w[2][l+2]) - gsum(w[0][l], w[1][l], w[2][l])) : '0;
    end
  end

  assign in_ready     = !v || (&out_ready);
  assign out_valid[0] = v && out_ready[1];
  assign out_valid[1] = v && out_ready[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v <= 1'b0;
    end else if (in_ready) begin
      v <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (in_ready && in_valid) begin
      grad     <= g;
      out_last <= in_last;
    end
  end

endmodule
