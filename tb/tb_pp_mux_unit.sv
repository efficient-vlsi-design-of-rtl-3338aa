// tb_pp_mux_unit: checks the layer-1 multiplexers. Random candidates and
// coefficients; group k must select 0 / x_half / x_full / a0 for the 2-bit value
// (Hm / 4^(7-k)) mod 4, reduced to its 17-2k significant bits and
// sign-extended. Every pattern is driven in every group.
module tb_pp_mux_unit;
  import vh_pkg::*;
  int checks = 0, failures = 0;
  hmag_t hm;
  pp_t x_full [NPP];
  pp_t x_half [NPP];
  pp_t a0     [NPP];
  pp_t pp     [NPP];

  pp_mux_unit dut (.hm(hm), .x_full(x_full), .x_half(x_half), .a0(a0), .pp(pp));

  // keep the low w bits and copy bit w-1 upward
  function automatic pp_t sext(pp_t v, int w);
    pp_t r;
    for (int b = 0; b < PPW; b++) r[b] = (b < w) ? v[b] : v[w-1];
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int hv;
      hv = (i < 4) ? i * 16'h5555 : int'($urandom_range(0, 65535));
      hm = MW'(hv);
      for (int k = 0; k < NPP; k++) begin
        x_full[k] = PPW'($urandom);
        x_half[k] = PPW'($urandom);
        a0[k]     = PPW'($urandom);
      end
      #1;
      for (int k = 0; k < NPP; k++) begin
        int  sel;
        pp_t want;
        sel = (hv / (4 ** (7 - k))) % 4;
        want = (sel == 0) ? '0 : (sel == 1) ? x_half[k] : (sel == 2) ? x_full[k] : a0[k];
        want = sext(want, 17 - 2 * k);
        checks++;
        if (pp[k] !== want) begin
          failures++;
          if (failures < 10) $display("FAIL hm=%h k=%0d: %h want %h", hv, k, pp[k], want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
