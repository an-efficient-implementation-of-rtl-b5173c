// tb_sobel_window_align: self-checking test of the window register. It
// checks the transpose p[3c+r] = im[3r+c] on the window of the published
// trace (im 82 4b 83 ec 82 b1 e5 d8 71 gives p 82 ec e5 4b 82 d8 83 b1 71),
// the one-clock latency, holding while start is low, the asynchronous reset
// to zero and 2000 random windows with random start.
module tb_sobel_window_align;
  import sobel_pkg::*;

  logic    clk = 0, rst_n = 0, start = 0;
  window_t im, p, expected;
  int checks = 0, failures = 0;

  sobel_window_align dut (.clk(clk), .rst_n(rst_n), .start(start), .im(im), .p(p));

  always #5 clk = ~clk;

  function automatic window_t transpose(window_t w);
    window_t t;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        t[3*c + r] = w[3*r + c];
    return t;
  endfunction

  task automatic expect_p(window_t e, string what);
    checks++;
    if (p !== e) begin
      failures++;
      $display("FAIL %s: p=%h expected %h", what, p, e);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    im = '0;
    #12 rst_n = 1;
    @(negedge clk);
    expect_p('0, "after reset");
    // Trace window, row-major im11..im33.
    im = {8'h71, 8'hd8, 8'he5, 8'hb1, 8'h82, 8'hec, 8'h83, 8'h4b, 8'h82};
    start = 1;
    expect_p('0, "before the clock edge");
    @(negedge clk);
    expect_p({8'h71, 8'hb1, 8'h83, 8'hd8, 8'h82, 8'h4b, 8'he5, 8'hec, 8'h82}, "trace window");
    // Hold with start low.
    expected = p;
    start = 0;
    im = ~im;
    @(negedge clk);
    expect_p(expected, "hold");
    // Random stream.
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 9; i++) im[i] = pixel_t'($urandom);
      start = ($urandom_range(0, 3) != 0);
      if (start) expected = transpose(im);
      @(negedge clk);
      expect_p(expected, "stream");
    end
    // Asynchronous reset between clock edges.
    #2 rst_n = 0;
    #1 expect_p('0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
