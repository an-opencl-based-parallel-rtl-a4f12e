// sobel_pkg: constants and types shared by the Sobel edge-detection pipeline.
//
// Pixels are 8-bit grey levels. The pipeline moves VEC pixels per word and per
// clock (the vector width of the kernels). Gradients Gx and Gy of a 3x3 Sobel
// mask on 8-bit pixels lie in -1020..+1020, so they are carried as 12-bit
// signed values. The gradient orientation is an unsigned angle in half-degree
// units, 0 (horizontal gradient) .. 180 (vertical gradient), i.e. 0..90 degrees,
// because it is taken of |Gy|/|Gx|.
// VEC = 8 follows the original OpenCL design's use of eight-wide vector types;
// the other widths and the 5760 x 3480 maximum image (its largest evaluated
// frame) size the datapath and counters.
package sobel_pkg;

  // Vector width: pixels per memory word and per clock (an int8-style vector).
  localparam int unsigned VEC       = 8;
  localparam int unsigned PIX_W     = 8;
  localparam int unsigned GRAD_W    = 12;   // signed gradient width
  localparam int unsigned MAG_W     = 12;   // |Gx|+|Gy| <= 2040
  localparam int unsigned ANG_W     = 8;    // half-degree angle, 0..180
  // Widest row the on-chip line buffers hold; widths and heights are 13-bit.
  localparam int unsigned MAX_WIDTH  = 5760;
  localparam int unsigned DIM_W      = 13;  // width/height fields (<= 8191)
  localparam int unsigned ADDR_W     = 32;  // global-memory word address

  typedef logic [PIX_W-1:0] pix_t;

  // Output pixel values of the edge map.
  localparam pix_t EDGE_ON  = 8'hFF;
  localparam pix_t EDGE_OFF = 8'h00;

endpackage
