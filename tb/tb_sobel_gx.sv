// tb_sobel_gx: self-checking test of the gx gradient unit. The reference is
// the kernel written out as integer weights (-1 0 1 / -2 0 2 / -1 0 1 over
// p0..p8). It checks the two windows of the published trace (gx = 0x14f and
// 0x16b), the two extremes +-1020 and 5000 random windows.
module tb_sobel_gx;
  import sobel_pkg::*;

  window_t p;
  grad_t   gx;
  int checks = 0, failures = 0;

  sobel_gx dut (.p(p), .gx(gx));

  localparam int W [9] = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};

  function automatic int ref_gx(window_t w);
    int s = 0;
    for (int i = 0; i < 9; i++) s += W[i] * int'(w[i]);
    return s;
  endfunction

  task automatic check(window_t w);
    p = w;
    #1;
    checks++;
    if (int'(gx) != ref_gx(w)) begin
      failures++;
      $display("FAIL gx=%0d expected %0d", gx, ref_gx(w));
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
    checks++; if (gx != 11'sh16b) begin failures++; $display("FAIL trace window 2"); end
    check(mk(8'hc1, 8'h81, 8'h05, 8'h04, 8'hf5, 8'he2, 8'h49, 8'h15, 8'h98));
    checks++; if (gx != 11'sh14f) begin failures++; $display("FAIL trace window 1"); end
    check(mk(0, 0, 255, 0, 0, 255, 0, 0, 255));
    checks++; if (gx != 11'sd1020) begin failures++; $display("FAIL max"); end
    check(mk(255, 0, 0, 255, 0, 0, 255, 0, 0));
    checks++; if (gx != -11'sd1020) begin failures++; $display("FAIL min"); end
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < 9; i++) w[i] = pixel_t'($urandom);
      check(w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
