// tb_sobel_sum: self-checking test of the compressor (|gx| + |gy|). It checks
// the trace sums 0x14f + 0x0bd = 0x20c and 0x16b + 0x0e9 = 0x254, the
// largest sum 1020 + 1020 = 2040 and 5000 random pairs of magnitudes.
module tb_sobel_sum;
  import sobel_pkg::*;

  mag_t a, b, s;
  int checks = 0, failures = 0;

  sobel_sum dut (.gx_abs(a), .gy_abs(b), .sum(s));

  task automatic check(int x, int y);
    a = mag_t'(x);
    b = mag_t'(y);
    #1;
    checks++;
    if (int'(s) != x + y) begin
      failures++;
      $display("FAIL %0d + %0d = %0d", x, y, s);
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
    check('h14f, 'h0bd);
    check('h16b, 'h0e9);
    check(GRAD_MAX, GRAD_MAX);
    check(0, 0);
    for (int n = 0; n < 5000; n++) check(int'($urandom_range(0, GRAD_MAX)), int'($urandom_range(0, GRAD_MAX)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
