// tb_sobel_abs: self-checking test of the absolute-value unit. It checks
// every input in the Sobel range -1020..1020 against the integer absolute
// value, plus the trace values 0x16b and 0x0e9, which must pass unchanged.
module tb_sobel_abs;
  import sobel_pkg::*;

  grad_t g;
  mag_t  a;
  int checks = 0, failures = 0;

  sobel_abs dut (.g(g), .g_abs(a));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    for (int v = -GRAD_MAX; v <= GRAD_MAX; v++) begin
      g = grad_t'(v);
      #1;
      expv = (v < 0) ? -v : v;
      checks++;
      if (int'(a) != expv) begin
        failures++;
        $display("FAIL abs(%0d) = %0d", v, a);
      end
    end
    g = 11'sh16b; #1; checks++; if (a != 11'h16b) failures++;
    g = 11'sh0e9; #1; checks++; if (a != 11'h0e9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
