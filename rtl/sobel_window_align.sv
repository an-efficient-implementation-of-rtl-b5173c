// sobel_window_align: captures one 3x3 sub-window and puts it in the order the
// gradient units expect.
//
// The detector receives its window as nine pixels named after their place in
// the sub-window, im11..im33, packed here row-major as im[0]=im11, im[1]=im12,
// ..., im[8]=im33. The gradient adders work on p0..p8, where p = im
// transposed: p0=im11, p1=im21, p2=im31, p3=im12, p4=im22, p5=im32, p6=im13,
// p7=im23, p8=im33. This is the correspondence seen in the detector's
// simulation traces. Because the two Sobel kernels are transposes of each
// other, the transpose only swaps which gradient is called gx and which gy;
// the final |gx|+|gy| is unchanged.
//
// Timing: the window is registered on the rising clock edge when start is
// high and held while start is low, so p is valid one cycle after the window
// is presented. rst_n is an asynchronous, active-low reset that clears the
// window to zero (a flat window, no edge). The enable and reset polarity are
// this design's choices.
module sobel_window_align
  import sobel_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  window_t im,   // im[3*(r-1)+(c-1)] = im<r><c>
  output window_t p     // p0..p8, registered
);

  window_t p_next;

  always_comb begin
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < 3; c++) begin
        p_next[3*c + r] = im[3*r + c];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p <= '0;
    end else if (start) begin
      p <= p_next;
    end
  end

endmodule
