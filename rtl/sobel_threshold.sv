// sobel_threshold: the comparator that turns the gradient magnitude into a
// binary edge pixel. When sum is strictly greater than threshold the output
// dxy is 255 (edge), otherwise 0 (no edge). The threshold is an input so the
// enclosing design decides where it comes from; in the detector it is a
// parameter. Purely combinational.
module sobel_threshold
  import sobel_pkg::*;
(
  input  mag_t   sum,
  input  mag_t   threshold,
  output pixel_t dxy
);

  always_comb begin
    dxy = (sum > threshold) ? EDGE_HIGH : EDGE_LOW;
  end

endmodule
