// sobel_pkg: types and widths shared by the shift-and-add Sobel edge detector.
//
// A window is nine 8-bit grey pixels packed as p[0]..p[8]. A gradient is an
// 11-bit two's-complement number: the largest Sobel response is 4*255 = 1020,
// which fits in 11 signed bits, and the 11-bit width of the gradients and of
// the sum follows the detector's published simulation traces. The magnitude
// sum |gx|+|gy| is at most 2040 and fits in 11 unsigned bits. The output is
// one 8-bit pixel that is either EDGE_HIGH (255) or EDGE_LOW (0).
package sobel_pkg;

  localparam int unsigned PIX_W  = 8;   // grey pixel width
  localparam int unsigned GRAD_W = 11;  // gradient and magnitude width
  localparam int unsigned NPIX   = 9;   // pixels in a 3x3 window

  typedef logic [PIX_W-1:0]          pixel_t;
  typedef logic signed [GRAD_W-1:0]  grad_t;
  typedef logic [GRAD_W-1:0]         mag_t;

  // Nine pixels of one 3x3 window, index 0..8.
  typedef pixel_t [NPIX-1:0]         window_t;

  localparam pixel_t EDGE_HIGH = 8'hFF;
  localparam pixel_t EDGE_LOW  = 8'h00;

  // Largest possible gradient magnitude (weights 1+2+1 times 255).
  localparam int GRAD_MAX = 4 * (2**PIX_W - 1);

endpackage
