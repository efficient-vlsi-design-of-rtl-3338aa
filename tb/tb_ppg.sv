// tb_ppg: checks the partial product generator. For every 16-bit input the
// candidates of group k must be floor(Xin/4^k), floor(Xin/(2*4^k)) and
// floor((Xin + floor(Xin/2))/4^k), and each must fit its 17-2k-bit width.
module tb_ppg;
  import vh_pkg::*;
  int checks = 0, failures = 0;
  sample_t xin;
  pp_t x_full [NPP];
  pp_t x_half [NPP];
  pp_t a0     [NPP];

  ppg dut (.xin(xin), .x_full(x_full), .x_half(x_half), .a0(a0));

  function automatic bit fits(int v, int w);
    return (v >= -(1 <<< (w - 1))) && (v < (1 <<< (w - 1)));
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -32768; v < 32768; v++) begin
      xin = XW'(v);
      #1;
      for (int k = 0; k < NPP; k++) begin
        int wf, wh, wa, a0v;
        wf  = int'($floor(real'(v) / (4.0 ** k)));
        wh  = int'($floor(real'(v) / (2.0 * 4.0 ** k)));
        a0v = v + int'($floor(real'(v) / 2.0));
        wa  = int'($floor(real'(a0v) / (4.0 ** k)));
        checks++;
        if (int'(x_full[k]) != wf || int'(x_half[k]) != wh || int'(a0[k]) != wa ||
            !fits(wa, 17 - 2 * k)) begin
          failures++;
          if (failures < 10)
            $display("FAIL x=%0d k=%0d: %0d %0d %0d want %0d %0d %0d",
                     v, k, x_full[k], x_half[k], a0[k], wf, wh, wa);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
