// tb_sobel_gy: self-checking test of the gy gradient unit. The reference is
// the kernel written out as integer weights (1 2 1 / 0 0 0 / -1 -2 -1 over
// p0..p8). It checks the two windows of the published trace (gy = 0x0bd and
// 0x0e9), the two extremes +-1020 and 5000 random windows.
module tb_sobel_gy;
  import sobel_pkg::*;

  window_t p;
  grad_t   gy;
  int checks = 0, failures = 0;

  sobel_gy dut (.p(p), .gy(gy));

  localparam int W [9] = '{1, 2, 1, 0, 0, 0, -1, -2, -1};

  function automatic int ref_gy(window_t w);
    int s = 0;
    for (int i = 0; i < 9; i++) s += W[i] * int'(w[i]);
    return s;
  endfunction

  task automatic check(window_t w);
    p = w;
    #1;
    checks++;
    if (int'(gy) != ref_gy(w)) begin
      failures++;
      $display("FAIL gy=%0d expected %0d", gy, ref_gy(w));
    end
  endtask

  function automatic window_t mk(byte unsigned a0, a1, a2, a3, a4, a5, a6, a7, a8);
    return {a8, a7, a6, a5, a4, a3, a2, a1, a0};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    window_t w;
    check(mk(8'h82, 8'hec, 8'he5, 8'h4b, 8'h82, 8'hd8, 8'h83, 8'hb1, 8'h71));
    checks++; if (gy != 11'sh0e9) begin failures++; $display("FAIL trace window 2"); end
    check(mk(8'hc1, 8'h81, 8'h05, 8'h04, 8'hf5, 8'he2, 8'h49, 8'h15, 8'h98));
    checks++; if (gy != 11'sh0bd) begin failures++; $display("FAIL trace window 1"); end
    check(mk(255, 255, 255, 0, 0, 0, 0, 0, 0));
    checks++; if (gy != 11'sd1020) begin failures++; $display("FAIL max"); end
    check(mk(0, 0, 0, 0, 0, 0, 255, 255, 255));
    checks++; if (gy != -11'sd1020) begin failures++; $display("FAIL min"); end
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < 9; i++) w[i] = pixel_t'($urandom);
      check(w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
