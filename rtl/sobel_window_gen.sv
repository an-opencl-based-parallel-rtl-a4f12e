// sobel_window_gen: builds the 3x3 Sobel neighbourhood of VEC pixels at a time
// out of the raster stream of image words, using on-chip line buffers and
// shift registers (the kernels' fast local memory).
//
// The image arrives as a row-major stream of words, VEC 8-bit pixels each,
// ww = ceil(width/VEC) words per row (a row is padded to whole words; padding
// lanes are ignored). Two line buffers of ww words delay the stream by one and
// two rows, and three 3-word shift registers (one per row) hold the words left
// and right of the centre word. After input word m has been taken, the window
// is centred on word m-ww-1: rows r-1, r, r+1 and, in each, the last pixel of
// the word to the left, the VEC pixels of the centre word and the first pixel
// of the word to the right, i.e. VEC+2 pixels per row.
//
// Output: win[row][k], row 0 = upper, 1 = centre, 2 = lower row; k = 0 is the
// pixel left of lane 0, k = l+1 is lane l, k = VEC+1 the pixel right of lane
// VEC-1. interior[l] is set when lane l is a pixel with all eight neighbours in
// the image (not on the border, not padding): the Sobel kernels output zero
// for the others. last marks the final word of the frame.
//
// Timing: after a start pulse (width/height sampled) it accepts one word per
// clock. The first window appears after ww+1 words; once the height*ww words
// are in, it feeds itself ww+1 flush words (in_ready low) to push out the
// last row. One window per clock while out_ready stays high.
// The use of line buffers and shift registers follows the original OpenCL design; the word
// layout, the border rule (border and padding pixels give no edge) and the
// flush are this design's choices.
module sobel_window_gen #(
  parameter int unsigned VEC       = sobel_pkg::VEC,
  parameter int unsigned PIX_W     = sobel_pkg::PIX_W,
  parameter int unsigned MAX_WIDTH = sobel_pkg::MAX_WIDTH,
  parameter int unsigned DIM_W     = sobel_pkg::DIM_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [DIM_W-1:0]       width,     // pixels per row, >= 1
  input  logic [DIM_W-1:0]       height,    // rows, >= 1
  output logic                   busy,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [VEC*PIX_W-1:0]   in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [2:0][VEC+1:0][PIX_W-1:0] win,
  output logic [VEC-1:0]         interior,
  output logic                   last
);
  localparam int unsigned MAX_WORDS = (MAX_WIDTH + VEC - 1) / VEC;
  localparam int unsigned PW        = (MAX_WORDS > 1) ? $clog2(MAX_WORDS) : 1;
  localparam int unsigned WW        = VEC * PIX_W;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH} state_t;
  state_t state;

  logic [DIM_W-1:0] w_q, h_q, ww_q;       // frame geometry
  logic [DIM_W-1:0] in_col, in_row;       // position of the next input word
  logic [DIM_W-1:0] flush_left;
  logic [DIM_W:0]   prime;                // fires still to come before the first window
  logic [DIM_W-1:0] o_col, o_row;         // position of the window on the output
  logic             emitted;
  logic [PW-1:0]    ptr, ptr_d;

  logic [WW-1:0] lb0 [MAX_WORDS];         // one row back
  logic [WW-1:0] lb1 [MAX_WORDS];         // two rows back
  logic [WW-1:0] b0, b1, c0, c1, t0, t1;
  logic [PIX_W-1:0] b2, c2, t2;           // only the last pixel of the left word is used

  logic          feeding, fire, producing;
  logic [WW-1:0] word_in;

  assign feeding   = (state == S_RUN && in_valid) || (state == S_FLUSH);
  assign fire      = feeding && (!out_valid || out_ready);
  assign in_ready  = (state == S_RUN) && (!out_valid || out_ready);
  assign word_in   = (state == S_RUN) ? in_data : '0;
  assign producing = (prime == '0);
  assign busy      = (state != S_IDLE) || out_valid;

  // line buffers: lb0 is read before write at the same pointer, so it returns
  // the word of one row back. lb1 is fed with the word lb0 returned on the
  // previous fire, written one slot behind, so reading it at the pointer
  // returns the word of two rows back.
  always_ff @(posedge clk) begin
    if (fire) begin
      c0 <= lb0[ptr];
      lb0[ptr] <= word_in;
      t0 <= (ww_q == DIM_W'(1)) ? c0 : lb1[ptr];   // one-word rows: the slot is the one being written
      lb1[ptr_d] <= c0;
      b0 <= word_in;
      b1 <= b0;  b2 <= b1[WW-1 -: PIX_W];
      c1 <= c0;  c2 <= c1[WW-1 -: PIX_W];
      t1 <= t0;  t2 <= t1[WW-1 -: PIX_W];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      w_q <= '0; h_q <= '0; ww_q <= '0;
      in_col <= '0; in_row <= '0; flush_left <= '0; prime <= '0;
      o_col <= '0; o_row <= '0; emitted <= 1'b0;
      ptr <= '0; ptr_d <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          w_q   <= width;
          h_q   <= height;
          ww_q  <= DIM_W'((width + DIM_W'(VEC - 1)) / DIM_W'(VEC));
          prime <= (DIM_W+1)'((width + DIM_W'(VEC - 1)) / DIM_W'(VEC)) + 1'b1;
          in_col <= '0; in_row <= '0;
          ptr <= '0; ptr_d <= '0;
          emitted <= 1'b0;
          state <= S_RUN;
        end
        default: ;
      endcase
      if (fire) begin
        ptr_d <= ptr;
        ptr   <= (DIM_W'(ptr) == ww_q - 1'b1) ? '0 : ptr + 1'b1;
        if (producing) begin
          out_valid <= 1'b1;
          emitted   <= 1'b1;
          if (!emitted) begin
            o_col <= '0; o_row <= '0;
          end else if (o_col == ww_q - 1'b1) begin
            o_col <= '0; o_row <= o_row + 1'b1;
          end else begin
            o_col <= o_col + 1'b1;
          end
        end else begin
          prime <= prime - 1'b1;
        end
        if (state == S_RUN) begin
          if (in_col == ww_q - 1'b1) begin
            in_col <= '0;
            in_row <= in_row + 1'b1;
            if (in_row == h_q - 1'b1) begin
              state      <= S_FLUSH;
              flush_left <= ww_q;        // ww+1 flush fires: this count, then one more
            end
          end else begin
            in_col <= in_col + 1'b1;
          end
        end else if (state == S_FLUSH) begin
          if (flush_left == '0) state <= S_IDLE;
          else flush_left <= flush_left - 1'b1;
        end
      end
    end
  end

  // window assembly
  always_comb begin
    for (int l = 0; l < int'(VEC); l++) begin
      win[0][l+1] = t1[l*PIX_W +: PIX_W];
      win[1][l+1] = c1[l*PIX_W +: PIX_W];
      win[2][l+1] = b1[l*PIX_W +: PIX_W];
    end
    win[0][0] = t2;
    win[1][0] = c2;
    win[2][0] = b2;
    win[0][VEC+1] = t0[PIX_W-1:0];
    win[1][VEC+1] = c0[PIX_W-1:0];
    win[2][VEC+1] = b0[PIX_W-1:0];
  end

  // border / padding mask of the current window
  always_comb begin
    logic [DIM_W+3:0] x;
    logic             row_in;
    row_in = (o_row != '0) && ((DIM_W+1)'(o_row) + 2 <= (DIM_W+1)'(h_q));
    for (int l = 0; l < int'(VEC); l++) begin
      x = (DIM_W+4)'(o_col) * (DIM_W+4)'(VEC) + (DIM_W+4)'(l);
      interior[l] = row_in && (x != '0) && (x + 2 <= (DIM_W+4)'(w_q));
    end
  end
  assign last = (o_row == h_q - 1'b1) && (o_col == ww_q - 1'b1);

  a_geometry: assert property (@(posedge clk) disable iff (!rst_n)
    (start && state == S_IDLE) |-> (width != '0 && height != '0 && width <= DIM_W'(MAX_WIDTH)))
    else $error("sobel_window_gen: frame size outside 1..MAX_WIDTH x 1..");

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> (out_valid && $stable(win)))
    else $error("sobel_window_gen: window changed while stalled");

endmodule
