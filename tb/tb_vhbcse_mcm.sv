// tb_vhbcse_mcm: checks the multiple-constant multiplier: one sample and eight
// independent coefficients per vector, every product compared bit for bit
// with the integer reference model; coefficients of different taps are chosen
// so that taps disagree in sign and reuse pattern within the same vector.
module tb_vhbcse_mcm;
  import vh_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned N = 8;
  int checks = 0, failures = 0;
  sample_t xin;
  coef_t   coef [N];
  prod_t   prod [N];

  vhbcse_mcm #(.N(N)) dut (.xin(xin), .coef(coef), .prod(prod));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int xv, hv [N];
      xv = (i < 3) ? (i == 0 ? -32768 : i == 1 ? 32767 : -1) : int'($urandom_range(0, 65535)) - 32768;
      for (int k = 0; k < N; k++) begin
        int n;
        n = int'($urandom_range(0, 15));
        case (k % 4)
          0: hv[k] = n * 'h1111;                                   // all nibbles equal
          1: hv[k] = -(int'($urandom_range(1, 500)));              // small negative
          2: hv[k] = int'($urandom_range(0, 255)) * 'h101;         // equal bytes
          default: hv[k] = int'($urandom_range(0, 131071)) - 65536;
        endcase
        coef[k] = HW'(hv[k]);
      end
      xin = XW'(xv);
      #1;
      for (int k = 0; k < N; k++) begin
        ref_flags_t f;
        int want;
        want = ref_mult(hv[k], xv, f);
        checks++;
        if (int'(prod[k]) != want) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d h=%0d x=%0d: %0d want %0d", k, hv[k], xv, prod[k], want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
