// tb_sobel_threshold: self-checking test of the comparator. For several
// thresholds it sweeps every sum 0..2040 and expects 255 strictly above the
// threshold and 0 at or below it; it also checks the trace sums 0x20c and
// 0x254 (edge) and 266 (no edge) against a threshold of 300.
module tb_sobel_threshold;
  import sobel_pkg::*;

  mag_t   s, t;
  pixel_t dxy;
  int checks = 0, failures = 0;

  sobel_threshold dut (.sum(s), .threshold(t), .dxy(dxy));

  task automatic check(int sv, int tv);
    s = mag_t'(sv);
    t = mag_t'(tv);
    #1;
    checks++;
    if (dxy != ((sv > tv) ? 8'd255 : 8'd0)) begin
      failures++;
      $display("FAIL sum=%0d thr=%0d dxy=%0d", sv, tv, dxy);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int thr [4] = '{0, 300, 1023, 2040};
    check('h20c, 300);
    check('h254, 300);
    check(266, 300);
    foreach (thr[k]) begin
      for (int v = 0; v <= 2 * GRAD_MAX; v++) check(v, thr[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
