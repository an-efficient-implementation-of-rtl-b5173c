// sobel_abs: absolute value of one gradient (the gx_abs / gy_abs units).
//
// The sign bit (MSB) of the 11-bit two's-complement gradient selects the
// output: when it is 1 the unit outputs the two's complement of the input
// (invert and add one), otherwise it passes the value unchanged. Gradients
// from the Sobel kernels never reach -1024, so the negation cannot overflow.
// Purely combinational.
module sobel_abs
  import sobel_pkg::*;
(
  input  grad_t g,
  output mag_t  g_abs
);

  always_comb begin
    if (g[GRAD_W-1]) begin
      g_abs = mag_t'(~g) + mag_t'(1);
    end else begin
      g_abs = mag_t'(g);
    end
  end

endmodule
