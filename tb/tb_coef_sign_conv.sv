// tb_coef_sign_conv: exhaustive check of the coefficient sign conversion.
// For every 17-bit H: Hm must equal H for H >= 0 and |H| - 1 for H < 0, and
// h_sign must be the sign of H.
module tb_coef_sign_conv;
  import vh_pkg::*;
  int checks = 0, failures = 0;
  coef_t h;
  hmag_t hm;
  logic  h_sign;

  coef_sign_conv dut (.h(h), .hm(hm), .h_sign(h_sign));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -65536; v < 65536; v++) begin
      int want;
      h = HW'(v);
      #1;
      want = (v < 0) ? (-v - 1) : v;
      checks++;
      if (int'(hm) != want || h_sign != (v < 0)) begin
        failures++;
        if (failures < 10) $display("FAIL H=%0d: hm=%0d sign=%b want %0d", v, hm, h_sign, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
