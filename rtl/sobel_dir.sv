// sobel_dir: the Dir kernel. It joins the Gx and Gy result streams and
// computes, for every lane, the gradient orientation
//     theta = atan(|Gy| / |Gx|)          (0..90 degrees)
// as an 8-bit angle in half-degree units (0..180).
//
// How: a pipelined CORDIC in vectoring mode. The vector (|Gx|, |Gy|), scaled by
// 2^FRAC, is rotated towards the x axis by +-atan(2^-i) for i = 0..NIT-1;
// the signed sum of those rotations is theta. The rotation angles are held in
// units of 1/32 degree, ATAN[i] = round(atan(2^-i) * 180/pi * 32), so the
// result is rounded to half degrees at the end. Gx = Gy = 0 (flat area,
// border and padding pixels) gives 0. The CORDIC gain does not matter: only
// the angle is used. With NIT = 12 the angle is within one half-degree unit of
// the exact value.
//
// Interface: like sobel_magn, a word is taken from both gradient channels at
// once. Timing: NIT+2 register stages, one word per clock; the whole pipeline
// holds while out_valid is high and out_ready low.
// The formula follows the original OpenCL design; the CORDIC, the angle coding and the
// precision are this design's choices.
module sobel_dir #(
  parameter int unsigned VEC    = sobel_pkg::VEC,
  parameter int unsigned GRAD_W = sobel_pkg::GRAD_W,
  parameter int unsigned ANG_W  = sobel_pkg::ANG_W,
  parameter int unsigned NIT    = 12,    // CORDIC iterations, 1..12
  parameter int unsigned FRAC   = 14     // fraction bits of the CORDIC datapath
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        gx_valid,
  output logic                        gx_ready,
  input  logic [VEC-1:0][GRAD_W-1:0]  gx,
  input  logic                        gx_last,
  input  logic                        gy_valid,
  output logic                        gy_ready,
  input  logic [VEC-1:0][GRAD_W-1:0]  gy,
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [VEC-1:0][ANG_W-1:0]   angle,
  output logic                        out_last
);
  localparam int unsigned XW = GRAD_W + FRAC + 3;   // room for the CORDIC gain
  localparam int unsigned ZW = 14;                  // 1/32 degree, |z| < 100 deg
  localparam int unsigned NS = NIT + 1;             // register stages before the output stage

  localparam logic [ZW-1:0] ATAN [12] = '{
    14'd1440, 14'd850, 14'd449, 14'd228, 14'd114, 14'd57,
    14'd29,   14'd14,  14'd7,   14'd4,   14'd2,   14'd1 };

  typedef struct packed {
    logic signed [XW-1:0] x;
    logic signed [XW-1:0] y;
    logic signed [ZW-1:0] z;
    logic                 zero;
  } lane_t;

  lane_t [VEC-1:0] st [NS];
  logic  [NS-1:0]  v, lst;
  logic            adv;

  function automatic logic [GRAD_W-1:0] absval(input logic [GRAD_W-1:0] g);
    logic signed [GRAD_W-1:0] s;
    s = g;
    return (s < 0) ? -s : s;
  endfunction

  assign adv      = !out_valid || out_ready;
  assign gx_ready = gy_valid && adv;
  assign gy_ready = gx_valid && adv;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v <= '0;
      out_valid <= 1'b0;
    end else if (adv) begin
      v <= {v[NS-2:0], gx_valid && gy_valid};
      out_valid <= v[NS-1];
    end
  end

  // stage 0: magnitudes into the CORDIC format
  always_ff @(posedge clk) begin
    if (adv) begin
      lst[0] <= gx_last;
      for (int l = 0; l < int'(VEC); l++) begin
        st[0][l].x    <= XW'(absval(gx[l])) <<< FRAC;
        st[0][l].y    <= XW'(absval(gy[l])) <<< FRAC;
        st[0][l].z    <= '0;
        st[0][l].zero <= (gx[l] == '0) && (gy[l] == '0);
      end
    end
  end

  // stages 1..NIT: one micro-rotation each
  for (genvar i = 0; i < int'(NIT); i++) begin : g_iter
    always_ff @(posedge clk) begin
      if (adv) begin
        lst[i+1] <= lst[i];
        for (int l = 0; l < int'(VEC); l++) begin
          st[i+1][l].zero <= st[i][l].zero;
          if (st[i][l].y >= 0) begin
            st[i+1][l].x <= st[i][l].x + (st[i][l].y >>> i);
            st[i+1][l].y <= st[i][l].y - (st[i][l].x >>> i);
            st[i+1][l].z <= st[i][l].z + $signed(ATAN[i]);
          end else begin
            st[i+1][l].x <= st[i][l].x - (st[i][l].y >>> i);
            st[i+1][l].y <= st[i][l].y + (st[i][l].x >>> i);
            st[i+1][l].z <= st[i][l].z - $signed(ATAN[i]);
          end
        end
      end
    end
  end

  // output stage: round to half degrees and clamp to 0..180
  always_ff @(posedge clk) begin
    if (adv) begin
      out_last <= lst[NS-1];
      for (int l = 0; l < int'(VEC); l++) begin
        logic signed [ZW-1:0] h;
        h = (st[NS-1][l].z + ZW'(8)) >>> 4;
        if (st[NS-1][l].zero || h < 0) angle[l] <= '0;
        else if (h > 180)              angle[l] <= ANG_W'(180);
        else                           angle[l] <= ANG_W'(h);
      end
    end
  end

  initial assert (NIT >= 1 && NIT <= 12) else $error("sobel_dir: NIT must be 1..12");

endmodule
