// tb_sobel_edge_detector: end-to-end self-checking test of the edge detector
// at its default threshold (300).
//
// The reference applies the two Sobel masks, (-1 -2 -1 / 0 0 0 / 1 2 1) and
// (1 0 -1 / 2 0 -2 / 1 0 -1), to the window in row-major order im11..im33,
// adds the absolute values and compares with 300. Every window is presented
// for one clock with start high and its result is checked on the next clock,
// which also checks the one-window-per-clock rate and one-clock latency.
// Directed windows: the two windows of the published trace (sums 0x20c and
// 0x254, both edges), the window 0xc1 0x24 0xa1 0xaf 0x15 0xce 0x5a 0x05 0x53
// (sum 266, no edge), sums exactly at and just above the threshold, and flat
// and extreme windows. Then random windows, mixed with cycles where start is
// low (the result must hold) and a reset in mid-stream (the result must drop
// to 0). Each mechanism is counted and one that never happens is a failure.
module tb_sobel_edge_detector;
  import sobel_pkg::*;

  localparam int THR = 300;

  logic   clk = 0, rst_n = 0, start = 0;
  pixel_t im [9];
  pixel_t dxy;
  int checks = 0, failures = 0;
  int n_edge = 0, n_flat = 0, n_gx_neg = 0, n_gy_neg = 0, n_hold = 0, n_reset = 0, n_at_thr = 0;

  sobel_edge_detector dut (
    .clk(clk), .rst_n(rst_n), .start(start),
    .im11(im[0]), .im12(im[1]), .im13(im[2]),
    .im21(im[3]), .im22(im[4]), .im23(im[5]),
    .im31(im[6]), .im32(im[7]), .im33(im[8]),
    .dxy(dxy)
  );

  always #5 clk = ~clk;

  localparam int MV [9] = '{-1, -2, -1, 0, 0, 0, 1, 2, 1};
  localparam int MH [9] = '{1, 0, -1, 2, 0, -2, 1, 0, -1};

  // Reference result of one window; also records which mechanisms it uses.
  function automatic pixel_t ref_dxy(pixel_t w [9], output int gv, output int gh, output int s);
    gv = 0; gh = 0;
    for (int i = 0; i < 9; i++) begin
      gv += MV[i] * int'(w[i]);
      gh += MH[i] * int'(w[i]);
    end
    s = (gv < 0 ? -gv : gv) + (gh < 0 ? -gh : gh);
    return (s > THR) ? 8'd255 : 8'd0;
  endfunction

  task automatic check(string what, pixel_t e);
    checks++;
    if (dxy !== e) begin
      failures++;
      $display("FAIL %s: dxy=%0d expected %0d", what, dxy, e);
    end
  endtask

  // Present one window for one clock and check its result on the next.
  task automatic run_window(pixel_t w [9]);
    int gv, gh, s;
    pixel_t e;
    e = ref_dxy(w, gv, gh, s);
    im = w;
    start = 1;
    @(negedge clk);
    check("window", e);
    if (e == 8'd255) n_edge++; else n_flat++;
    if (gv < 0) n_gx_neg++;
    if (gh < 0) n_gy_neg++;
    if (s == THR) n_at_thr++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pixel_t w [9];
    pixel_t last;
    foreach (im[i]) im[i] = '0;
    #12 rst_n = 1;
    @(negedge clk);
    check("after reset", 8'd0);

    // Published trace windows.
    run_window('{8'h82, 8'h4b, 8'h83, 8'hec, 8'h82, 8'hb1, 8'he5, 8'hd8, 8'h71});
    check("trace window sum 0x254", 8'd255);
    run_window('{8'hc1, 8'h24, 8'ha1, 8'haf, 8'h15, 8'hce, 8'h5a, 8'h05, 8'h53});
    check("trace window sum 266", 8'd0);
    // Sum exactly at the threshold (300) and just above it (302).
    run_window('{0, 0, 0, 0, 0, 0, 75, 75, 75});
    check("sum at threshold", 8'd0);
    run_window('{0, 0, 0, 0, 0, 0, 76, 75, 75});
    check("sum above threshold", 8'd255);
    // Flat and extreme windows.
    run_window('{200, 200, 200, 200, 200, 200, 200, 200, 200});
    run_window('{255, 255, 0, 255, 255, 0, 255, 255, 0});
    run_window('{0, 0, 0, 0, 0, 0, 255, 255, 255});
    run_window('{255, 255, 255, 255, 255, 255, 0, 0, 0});

    for (int n = 0; n < 20000; n++) begin
      if ($urandom_range(0, 9) == 0) begin
        // start low: the result must not change.
        last = dxy;
        start = 0;
        foreach (im[i]) im[i] = pixel_t'($urandom);
        @(negedge clk);
        check("hold", last);
        n_hold++;
      end else if ($urandom_range(0, 499) == 0) begin
        rst_n = 0;
        #1 check("reset", 8'd0);
        rst_n = 1;
        n_reset++;
        @(negedge clk);
      end else begin
        // Mix of smooth and busy windows so both outcomes are common.
        automatic int base = int'($urandom_range(0, 255));
        automatic int spread = int'($urandom_range(0, 255));
        foreach (w[i]) w[i] = pixel_t'(base + int'($urandom_range(0, spread)) - spread / 2);
        run_window(w);
      end
    end

    $display("edges=%0d flats=%0d gx_negative=%0d gy_negative=%0d hold=%0d reset=%0d at_threshold=%0d",
             n_edge, n_flat, n_gx_neg, n_gy_neg, n_hold, n_reset, n_at_thr);
    if (n_edge == 0)   begin failures++; $display("FAIL no edge output seen"); end
    if (n_flat == 0)   begin failures++; $display("FAIL no non-edge output seen"); end
    if (n_gx_neg == 0) begin failures++; $display("FAIL gx never negative"); end
    if (n_gy_neg == 0) begin failures++; $display("FAIL gy never negative"); end
    if (n_hold == 0)   begin failures++; $display("FAIL start never low"); end
    if (n_reset == 0)  begin failures++; $display("FAIL reset never applied"); end
    if (n_at_thr == 0) begin failures++; $display("FAIL threshold boundary never hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
