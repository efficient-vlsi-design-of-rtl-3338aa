// tb_vhbcse_coef_path: checks one coefficient path on its own. The testbench
// forms the shifted input candidates itself (floor(Xin/4^k),
// floor(Xin/(2*4^k)), floor((Xin + floor(Xin/2))/4^k)) and compares the path's
// product bit for bit with the integer reference model, on directed
// coefficients with repeated nibbles and bytes, extremes and random values.
module tb_vhbcse_coef_path;
  import vh_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  pp_t   x_full [NPP];
  pp_t   x_half [NPP];
  pp_t   a0     [NPP];
  coef_t h;
  prod_t y;

  vhbcse_coef_path dut (.x_full(x_full), .x_half(x_half), .a0(a0), .h(h), .y(y));

  function automatic int fl(real v);
    return int'($floor(v));
  endfunction

  task automatic apply(int hv, int xv);
    ref_flags_t f;
    int want, a0v;
    a0v = xv + fl(real'(xv) / 2.0);
    for (int k = 0; k < NPP; k++) begin
      x_full[k] = PPW'(fl(real'(xv) / (4.0 ** k)));
      x_half[k] = PPW'(fl(real'(xv) / (2.0 * 4.0 ** k)));
      a0[k]     = PPW'(fl(real'(a0v) / (4.0 ** k)));
    end
    h = HW'(hv);
    #1;
    want = ref_mult(hv, xv, f);
    checks++;
    if (int'(y) != want) begin
      failures++;
      if (failures < 10) $display("FAIL h=%0d x=%0d: %0d want %0d", hv, xv, y, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hs [10] = '{'h1111, 'h2323, 'h4545, 'h6767, 'hFFFF, -'h10000, -1, 0, 'h8000, 'h0001};
    foreach (hs[i]) begin
      apply(hs[i], -32768);
      apply(hs[i], 32767);
      apply(hs[i], -1);
    end
    for (int i = 0; i < 10000; i++) begin
      int hv;
      hv = int'($urandom_range(0, 131071));
      if (hv >= 65536) hv -= 131072;
      apply(hv, int'($urandom_range(0, 65535)) - 32768);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
