// tb_result_sign_conv: exhaustive check of the result sign conversion:
// y = p when the coefficient is non-negative, y = -p - 1 when it is negative.
module tb_result_sign_conv;
  import vh_pkg::*;
  int checks = 0, failures = 0;
  prod_t p, y;
  logic  h_sign;

  result_sign_conv dut (.p(p), .h_sign(h_sign), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -32768; v < 32768; v++)
      for (int s = 0; s < 2; s++) begin
        int want;
        p = YW'(v); h_sign = 1'(s);
        #1;
        want = s ? (-v - 1) : v;
        checks++;
        if (int'(y) != want) begin
          failures++;
          if (failures < 10) $display("FAIL p=%0d s=%0d: %0d want %0d", v, s, y, want);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
