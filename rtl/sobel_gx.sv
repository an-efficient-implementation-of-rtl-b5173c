// sobel_gx: first Sobel gradient of a 3x3 window, computed with subtractors,
// one shift and adders only (no multiplier).
//
//   gx = (p2 - p0) + ((p5 - p3) << 1) + (p8 - p6)
//
// This is a kernel with weights -1,-2,-1 on p0,p3,p6 and +1,+2,+1 on p2,p5,p8;
// the centre column has weight zero and is not read. The weight 2 is a
// left shift by one. Each difference is formed at 9 bits signed, the shifted
// one at 10 bits, and the total at 11 bits, which holds the extreme values
// +-1020 exactly. Purely combinational.
module sobel_gx
  import sobel_pkg::*;
(
  input  window_t p,
  output grad_t   gx
);

  grad_t d_a, d_b, d_c;

  always_comb begin
    d_a = grad_t'($signed({1'b0, p[2]})) - grad_t'($signed({1'b0, p[0]}));
    d_b = grad_t'($signed({1'b0, p[5]})) - grad_t'($signed({1'b0, p[3]}));
    d_c = grad_t'($signed({1'b0, p[8]})) - grad_t'($signed({1'b0, p[6]}));
    gx  = d_a + (d_b <<< 1) + d_c;
  end

  // The result can never leave the Sobel range.
  always_comb begin
    assert (gx <= grad_t'(GRAD_MAX) && gx >= -grad_t'(GRAD_MAX))
      else $error("sobel_gx: gradient %0d out of range", gx);
  end

endmodule
