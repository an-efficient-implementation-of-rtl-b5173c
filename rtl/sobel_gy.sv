// sobel_gy: second Sobel gradient of a 3x3 window, computed with subtractors,
// one shift and adders only (no multiplier).
//
//   gy = (p0 - p6) + ((p1 - p7) << 1) + (p2 - p8)
//
// This is a kernel with weights +1,+2,+1 on p0,p1,p2 and -1,-2,-1 on p6,p7,p8;
// the middle row has weight zero and is not read. The weight 2 is a left
// shift by one. Arithmetic is 11 bits signed, which holds the extreme values
// +-1020 exactly. Purely combinational.
module sobel_gy
  import sobel_pkg::*;
(
  input  window_t p,
  output grad_t   gy
);

  grad_t d_a, d_b, d_c;

  always_comb begin
    d_a = grad_t'($signed({1'b0, p[0]})) - grad_t'($signed({1'b0, p[6]}));
    d_b = grad_t'($signed({1'b0, p[1]})) - grad_t'($signed({1'b0, p[7]}));
    d_c = grad_t'($signed({1'b0, p[2]})) - grad_t'($signed({1'b0, p[8]}));
    gy  = d_a + (d_b <<< 1) + d_c;
  end

  // The result can never leave the Sobel range.
  always_comb begin
    assert (gy <= grad_t'(GRAD_MAX) && gy >= -grad_t'(GRAD_MAX))
      else $error("sobel_gy: gradient %0d out of range", gy);
  end

endmodule
