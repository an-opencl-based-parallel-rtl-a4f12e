// sobel_accel: Sobel edge detector as a set of concurrently running kernels
// joined by on-chip channels (task-parallel organisation).
//
//   global memory --> reader --> window generator --+--> Convx --+--> ch --> Magn --> writer --> edge map
//                     (FIFO)     (line buffers)     |            +--> ch --+
//                                                   |                      |
//                                                   +--> Convy --+--> ch --+
//                                                                +--> ch --> Dir  --> writer --> orientation
//                                                                             ^-- ch from Convx
//
// Only the reader touches the source image. Convx and Convy work on the same
// windows at the same time; each forwards its gradients over two dedicated
// channels, one to Magn and one to Dir, so no intermediate result is written
// to global memory. Magn thresholds |Gx|+|Gy| into an edge map (255 = edge),
// Dir produces atan(|Gy|/|Gx|) in half degrees. Each stage moves VEC pixels per
// clock, so an unstalled frame takes about height*ceil(width/VEC) clocks.
//
// Interface: a start pulse, with the configuration held stable until done,
// launches one frame: src_base/edge_base/dir_base are word addresses (a word =
// VEC pixels, rows padded to whole words), width/height in pixels, threshold
// on |Gx|+|Gy|. busy is high from start until both result images are
// written; done pulses for one clock at the end. Global memory is reached
// through one read port (requests with valid/ready, in-order responses
// without backpressure) and two write ports (valid/ready), all word wide.
// Inside, the links into and out of the four channels and the two result
// streams are sobel_stream_if instances, each checking the handshake rule.
// The kernel split, the channels and the vector width follow the original OpenCL design; the
// memory ports, the shared window generator feeding both convolution kernels
// and the channel depths are this design's choices.
module sobel_accel #(
  parameter int unsigned VEC        = sobel_pkg::VEC,
  parameter int unsigned MAX_WIDTH  = sobel_pkg::MAX_WIDTH,
  parameter int unsigned CH_DEPTH   = 16,
  parameter int unsigned RD_DEPTH   = 32
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // control and configuration (from the host)
  input  logic                                start,
  input  logic [sobel_pkg::ADDR_W-1:0]        src_base,
  input  logic [sobel_pkg::ADDR_W-1:0]        edge_base,
  input  logic [sobel_pkg::ADDR_W-1:0]        dir_base,
  input  logic [sobel_pkg::DIM_W-1:0]         width,
  input  logic [sobel_pkg::DIM_W-1:0]         height,
  input  logic [sobel_pkg::MAG_W-1:0]         threshold,
  output logic                                busy,
  output logic                                done,
  // global memory: read port
  output logic                                rd_req_valid,
  input  logic                                rd_req_ready,
  output logic [sobel_pkg::ADDR_W-1:0]        rd_req_addr,
  input  logic                                rd_resp_valid,
  input  logic [VEC*sobel_pkg::PIX_W-1:0]     rd_resp_data,
  // global memory: edge-map write port
  output logic                                we_valid,
  input  logic                                we_ready,
  output logic [sobel_pkg::ADDR_W-1:0]        we_addr,
  output logic [VEC*sobel_pkg::PIX_W-1:0]     we_data,
  // global memory: orientation write port
  output logic                                wd_valid,
  input  logic                                wd_ready,
  output logic [sobel_pkg::ADDR_W-1:0]        wd_addr,
  output logic [VEC*sobel_pkg::ANG_W-1:0]     wd_data
);
  import sobel_pkg::*;

  localparam int unsigned DW    = VEC * PIX_W;
  localparam int unsigned GW    = VEC * GRAD_W;
  localparam int unsigned CNT_W = 2 * DIM_W;

  // ---------------- control ----------------
  logic running, launch, done_e, done_d;
  logic [DIM_W-1:0] ww;
  logic [CNT_W-1:0] n_words;

  assign launch  = start && !running;
  assign ww      = DIM_W'((width + DIM_W'(VEC - 1)) / DIM_W'(VEC));
  assign n_words = CNT_W'(ww) * CNT_W'(height);
  assign busy    = running;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (launch) running <= 1'b1;
      else if (running && done_e && done_d) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

  // ---------------- reader ----------------
  logic          px_valid, px_ready;
  logic [DW-1:0] px_data;
  logic          rd_busy;

  sobel_mem_reader #(.DATA_W(DW), .ADDR_W(ADDR_W), .CNT_W(CNT_W), .DEPTH(RD_DEPTH)) u_reader (
    .clk, .rst_n,
    .start (launch), .base (src_base), .n_words, .busy (rd_busy),
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .out_valid (px_valid), .out_ready (px_ready), .out_data (px_data)
  );

  // ---------------- window generator ----------------
  logic                              w_valid, w_ready, w_last, wg_busy;
  logic [2:0][VEC+1:0][PIX_W-1:0]    win;
  logic [VEC-1:0]                    interior;
  logic                              cx_in_ready, cy_in_ready;

  sobel_window_gen #(.VEC(VEC), .PIX_W(PIX_W), .MAX_WIDTH(MAX_WIDTH), .DIM_W(DIM_W)) u_win (
    .clk, .rst_n,
    .start (launch), .width, .height, .busy (wg_busy),
    .in_valid (px_valid), .in_ready (px_ready), .in_data (px_data),
    .out_valid (w_valid), .out_ready (w_ready), .win, .interior, .last (w_last)
  );

  // both convolution kernels take each window together
  assign w_ready = cx_in_ready && cy_in_ready;

  // ---------------- Convx / Convy ----------------
  logic [1:0]                  cx_valid, cx_ready, cy_valid, cy_ready;
  logic [VEC-1:0][GRAD_W-1:0]  gx, gy;
  logic                        gx_last, gy_last;

  sobel_convx #(.VEC(VEC), .PIX_W(PIX_W), .GRAD_W(GRAD_W)) u_convx (
    .clk, .rst_n,
    .in_valid (w_valid && cy_in_ready), .in_ready (cx_in_ready),
    .win, .interior, .in_last (w_last),
    .out_valid (cx_valid), .out_ready (cx_ready), .grad (gx), .out_last (gx_last)
  );

  sobel_convy #(.VEC(VEC), .PIX_W(PIX_W), .GRAD_W(GRAD_W)) u_convy (
    .clk, .rst_n,
    .in_valid (w_valid && cx_in_ready), .in_ready (cy_in_ready),
    .win, .interior, .in_last (w_last),
    .out_valid (cy_valid), .out_ready (cy_ready), .grad (gy), .out_last (gy_last)
  );

  // ---------------- channels ----------------
  // Every kernel-to-channel and channel-to-kernel link is a sobel_stream_if,
  // which also checks the valid/ready hold rule on that link.
  sobel_stream_if #(.WIDTH(GW+1)) l_x2m (clk, rst_n), l_x2d (clk, rst_n),   // Convx -> channels
                                  l_mgx (clk, rst_n), l_dgx (clk, rst_n);   // channels -> Magn, Dir
  sobel_stream_if #(.WIDTH(GW))   l_y2m (clk, rst_n), l_y2d (clk, rst_n),   // Convy -> channels
                                  l_mgy (clk, rst_n), l_dgy (clk, rst_n);   // channels -> Magn, Dir
  sobel_stream_if #(.WIDTH(DW+1))          l_edge (clk, rst_n);            // Magn -> writer
  sobel_stream_if #(.WIDTH(VEC*ANG_W+1))   l_ang  (clk, rst_n);            // Dir -> writer
  logic [$clog2(CH_DEPTH+1)-1:0] lvl_xm, lvl_xd, lvl_ym, lvl_yd;

  assign l_x2m.valid = cx_valid[0];
  assign l_x2d.valid = cx_valid[1];
  assign l_x2m.data  = {gx_last, gx};
  assign l_x2d.data  = {gx_last, gx};
  assign cx_ready    = {l_x2d.ready, l_x2m.ready};
  assign l_y2m.valid = cy_valid[0];
  assign l_y2d.valid = cy_valid[1];
  assign l_y2m.data  = gy;
  assign l_y2d.data  = gy;
  assign cy_ready    = {l_y2d.ready, l_y2m.ready};

  sobel_channel #(.WIDTH(GW+1), .DEPTH(CH_DEPTH)) u_ch_xm (
    .clk, .rst_n, .in_valid (l_x2m.valid), .in_ready (l_x2m.ready), .in_data (l_x2m.data),
    .out_valid (l_mgx.valid), .out_ready (l_mgx.ready), .out_data (l_mgx.data), .level (lvl_xm));
  sobel_channel #(.WIDTH(GW+1), .DEPTH(CH_DEPTH)) u_ch_xd (
    .clk, .rst_n, .in_valid (l_x2d.valid), .in_ready (l_x2d.ready), .in_data (l_x2d.data),
    .out_valid (l_dgx.valid), .out_ready (l_dgx.ready), .out_data (l_dgx.data), .level (lvl_xd));
  sobel_channel #(.WIDTH(GW), .DEPTH(CH_DEPTH)) u_ch_ym (
    .clk, .rst_n, .in_valid (l_y2m.valid), .in_ready (l_y2m.ready), .in_data (l_y2m.data),
    .out_valid (l_mgy.valid), .out_ready (l_mgy.ready), .out_data (l_mgy.data), .level (lvl_ym));
  sobel_channel #(.WIDTH(GW), .DEPTH(CH_DEPTH)) u_ch_yd (
    .clk, .rst_n, .in_valid (l_y2d.valid), .in_ready (l_y2d.ready), .in_data (l_y2d.data),
    .out_valid (l_dgy.valid), .out_ready (l_dgy.ready), .out_data (l_dgy.data), .level (lvl_yd));

  // ---------------- Magn / Dir ----------------
  logic [DW-1:0]              edges;
  logic [VEC-1:0][ANG_W-1:0]  angle;
  logic                       e_last, a_last;

  sobel_magn #(.VEC(VEC), .PIX_W(PIX_W), .GRAD_W(GRAD_W), .MAG_W(MAG_W)) u_magn (
    .clk, .rst_n, .threshold,
    .gx_valid (l_mgx.valid), .gx_ready (l_mgx.ready), .gx (l_mgx.data[GW-1:0]), .gx_last (l_mgx.data[GW]),
    .gy_valid (l_mgy.valid), .gy_ready (l_mgy.ready), .gy (l_mgy.data),
    .out_valid (l_edge.valid), .out_ready (l_edge.ready), .edges, .out_last (e_last)
  );
  assign l_edge.data = {e_last, edges};

  sobel_dir #(.VEC(VEC), .GRAD_W(GRAD_W), .ANG_W(ANG_W)) u_dir (
    .clk, .rst_n,
    .gx_valid (l_dgx.valid), .gx_ready (l_dgx.ready), .gx (l_dgx.data[GW-1:0]), .gx_last (l_dgx.data[GW]),
    .gy_valid (l_dgy.valid), .gy_ready (l_dgy.ready), .gy (l_dgy.data),
    .out_valid (l_ang.valid), .out_ready (l_ang.ready), .angle, .out_last (a_last)
  );
  assign l_ang.data = {a_last, angle};

  // ---------------- writers ----------------
  sobel_mem_writer #(.DATA_W(DW), .ADDR_W(ADDR_W)) u_wr_edge (
    .clk, .rst_n, .start (launch), .base (edge_base), .done (done_e),
    .in_valid (l_edge.valid), .in_ready (l_edge.ready), .in_data (l_edge.data[DW-1:0]),
    .in_last (l_edge.data[DW]),
    .wr_valid (we_valid), .wr_ready (we_ready), .wr_addr (we_addr), .wr_data (we_data)
  );

  sobel_mem_writer #(.DATA_W(VEC*ANG_W), .ADDR_W(ADDR_W)) u_wr_dir (
    .clk, .rst_n, .start (launch), .base (dir_base), .done (done_d),
    .in_valid (l_ang.valid), .in_ready (l_ang.ready), .in_data (l_ang.data[VEC*ANG_W-1:0]),
    .in_last (l_ang.data[VEC*ANG_W]),
    .wr_valid (wd_valid), .wr_ready (wd_ready), .wr_addr (wd_addr), .wr_data (wd_data)
  );

  // The Convy result carries the same frame position as Convx; its last flag
  // and the busy flags of the reader and window generator are only checked.
  a_last_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (cx_valid[0] && cx_ready[0]) |-> (gx_last == gy_last))
    else $error("sobel_accel: Convx and Convy out of step");
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> (!rd_busy && !wg_busy))
    else $error("sobel_accel: done while the front end is still busy");

endmodule
