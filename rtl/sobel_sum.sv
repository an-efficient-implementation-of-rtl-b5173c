// sobel_sum: the compressor stage. It reduces the two gradient magnitudes of
// a window to one value, sum = |gx| + |gy|, the usual shift-free
// approximation of the gradient magnitude sqrt(gx^2 + gy^2). Both inputs are
// at most 1020, so the 11-bit sum (at most 2040) never overflows. Purely
// combinational.
module sobel_sum
  import sobel_pkg::*;
(
  input  mag_t gx_abs,
  input  mag_t gy_abs,
  output mag_t sum
);

  always_comb begin
    sum = gx_abs + gy_abs;
  end

endmodule
