// sobel_edge_detector: multiplier-free Sobel edge detector for one 3x3 window
// of 8-bit grey pixels.
//
// Data path (one window per clock):
//   im11..im33 --> window register (transpose to p0..p8, enabled by start)
//              --> gx unit, gy unit      (subtract, shift by one, add)
//              --> gx_abs, gy_abs        (two's complement if the MSB is set)
//              --> sum = |gx| + |gy|     (the compressor)
//              --> comparator            (sum > THRESHOLD ? 255 : 0) --> dxy
//
// Interface: clk; rst_n, asynchronous and active low; start, which loads the
// window on a rising clock edge; nine 8-bit pixels im<row><column>; the 8-bit
// result dxy for the centre pixel, 0 or 255.
//
// Timing: the only register is the window register. dxy belongs to the window
// presented one clock earlier with start high and follows from that register
// through combinational logic; with start low the window and dxy are held.
// A new window can be given every clock. After reset the window is all zero
// and dxy is 0.
//
// The gradient expressions, the absolute-value rule, the sum and the
// threshold comparison with a 0/255 output follow the published design, as do
// the port names and widths (8-bit pixels and output, 11-bit gradients). The
// threshold value, the reset polarity and the use of start as a load enable
// are this design's choices: THRESHOLD = 300 is one value consistent with
// the published example windows (a sum of 524 or 596 gives 255, a sum of 266
// gives 0).
module sobel_edge_detector
  import sobel_pkg::*;
#(
  parameter int unsigned THRESHOLD = 300
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  pixel_t im11,
  input  pixel_t im12,
  input  pixel_t im13,
  input  pixel_t im21,
  input  pixel_t im22,
  input  pixel_t im23,
  input  pixel_t im31,
  input  pixel_t im32,
  input  pixel_t im33,
  output pixel_t dxy
);

  window_t im_win;
  window_t p;
  grad_t   gx, gy;
  mag_t    gx_abs, gy_abs;
  mag_t    sum;

  // Row-major packing of the named window pixels.
  assign im_win = {im33, im32, im31, im23, im22, im21, im13, im12, im11};

  sobel_window_align u_align (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .im    (im_win),
    .p     (p)
  );

  sobel_gx u_gx (.p(p), .gx(gx));
  sobel_gy u_gy (.p(p), .gy(gy));

  sobel_abs u_gx_abs (.g(gx), .g_abs(gx_abs));
  sobel_abs u_gy_abs (.g(gy), .g_abs(gy_abs));

  sobel_sum u_sum (.gx_abs(gx_abs), .gy_abs(gy_abs), .sum(sum));

  sobel_threshold u_cmp (
    .sum       (sum),
    .threshold (mag_t'(THRESHOLD)),
    .dxy       (dxy)
  );

endmodule
