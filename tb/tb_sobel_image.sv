// tb_sobel_image: full-image test of the edge detector at its default
// parameters. A 256x256 8-bit grey image is generated here (a smooth
// horizontal ramp, a bright disc, a dark rectangle, a thin diagonal line and
// light pseudo-random noise), and every one of its 65536 pixels is processed
// as the centre of a 3x3 window, with the border pixels replicated outward.
// The windows are fed one per clock with start held high, so the whole
// image takes 65536 clocks plus one clock of latency; the test checks every
// output pixel against a reference Sobel magnitude |Gv|+|Gh| > 300 and checks
// the clock count. It also counts edge and non-edge pixels and windows with a
// negative gradient, and fails if any of these never occurs.
module tb_sobel_image;
  import sobel_pkg::*;

  localparam int W = 256, H = 256, THR = 300;

  logic   clk = 0, rst_n = 0, start = 0;
  pixel_t im [9];
  pixel_t dxy;
  pixel_t img [H][W];
  int checks = 0, failures = 0;
  int n_edge = 0, n_flat = 0, n_gv_neg = 0, n_gh_neg = 0;
  longint cycles = 0;

  sobel_edge_detector dut (
    .clk(clk), .rst_n(rst_n), .start(start),
    .im11(im[0]), .im12(im[1]), .im13(im[2]),
    .im21(im[3]), .im22(im[4]), .im23(im[5]),
    .im31(im[6]), .im32(im[7]), .im33(im[8]),
    .dxy(dxy)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (start) cycles++;

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic pixel_t pix(int y, int x);
    return img[clampi(y, 0, H - 1)][clampi(x, 0, W - 1)];
  endfunction

  task automatic make_image();
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        int v = 40 + x / 4;                                        // ramp
        int dy = y - 110, dx = x - 128;
        if (dx * dx + dy * dy < 60 * 60) v = 220;                  // disc
        if (y >= 180 && y < 230 && x >= 30 && x < 120) v = 10;     // rectangle
        if (x == y || x == y + 1) v = 250;                         // diagonal line
        v += int'($urandom_range(0, 12)) - 6;                      // noise
        img[y][x] = pixel_t'(clampi(v, 0, 255));
      end
    end
  endtask

  initial begin
    repeat (W * H + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gv, gh, s;
    pixel_t e;
    make_image();
    foreach (im[i]) im[i] = '0;
    #12 rst_n = 1;
    @(negedge clk);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            im[3*r + c] = pix(y + r - 1, x + c - 1);
        gv = (int'(im[6]) + 2 * int'(im[7]) + int'(im[8])) - (int'(im[0]) + 2 * int'(im[1]) + int'(im[2]));
        gh = (int'(im[0]) + 2 * int'(im[3]) + int'(im[6])) - (int'(im[2]) + 2 * int'(im[5]) + int'(im[8]));
        s = (gv < 0 ? -gv : gv) + (gh < 0 ? -gh : gh);
        e = (s > THR) ? 8'd255 : 8'd0;
        start = 1;
        @(negedge clk);
        checks++;
        if (dxy !== e) begin
          failures++;
          if (failures < 10) $display("FAIL pixel (%0d,%0d): dxy=%0d expected %0d", y, x, dxy, e);
        end
        if (e == 8'd255) n_edge++; else n_flat++;
        if (gv < 0) n_gv_neg++;
        if (gh < 0) n_gh_neg++;
      end
    end
    start = 0;
    checks++;
    if (cycles != longint'(W * H)) begin
      failures++;
      $display("FAIL image took %0d clocks, expected %0d", cycles, W * H);
    end
    $display("image %0dx%0d: %0d edge pixels, %0d non-edge, %0d clocks with start high",
             W, H, n_edge, n_flat, cycles);
    if (n_edge == 0)   begin failures++; $display("FAIL no edge pixel"); end
    if (n_flat == 0)   begin failures++; $display("FAIL no non-edge pixel"); end
    if (n_gv_neg == 0) begin failures++; $display("FAIL vertical gradient never negative"); end
    if (n_gh_neg == 0) begin failures++; $display("FAIL horizontal gradient never negative"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
