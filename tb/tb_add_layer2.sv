// tb_add_layer2: checks the layer-2 controlled addition. Partial products are
// random within their 17-2k-bit ranges (extremes included) and the control
// flags take all 64 combinations of C1..C6; each output must equal the group
// sum picked by the priority C1 / C2,C3 / C4,C5,C6 with floor-division shifts.
// Adders whose sum is not needed must be isolated (internal sum held at 0).
module tb_add_layer2;
  import vh_pkg::*;
  int checks = 0, failures = 0;
  int n_idle = 0;
  pp_t   pp [NPP];
  ctrl_t ctrl;
  logic signed [AS1W-1:0] as1;
  logic signed [AS2W-1:0] as2;
  logic signed [AS3W-1:0] as3;
  logic signed [AS4W-1:0] as4;

  add_layer2 dut (.pp(pp), .ctrl(ctrl), .as1(as1), .as2(as2), .as3(as3), .as4(as4));

  function automatic int fdiv(int v, int d);
    return int'($floor(real'(v) / real'(d)));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    checks++;
    if (n_idle == 0) failures++;
    $display("isolated adder evaluations: %0d", n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int v [8], g [4], w2, w3, w4;
      for (int k = 0; k < 8; k++) begin
        int lim;
        lim = 49152 / (4 ** k);  // largest |A0 >>> 2k|
        case (i % 4)
          0: v[k] = -lim;
          1: v[k] = lim - 1;
          default: v[k] = int'($urandom_range(0, 2 * lim - 1)) - lim;
        endcase
        pp[k] = PPW'(v[k]);
      end
      ctrl = ctrl_t'({1'b0, 6'(i % 64)});
      #1;
      for (int j = 0; j < 4; j++) g[j] = v[2*j] + v[2*j+1];
      w2 = ctrl.c1 ? fdiv(g[0], 16) : g[1];
      w3 = ctrl.c2 ? fdiv(g[0], 256) : ctrl.c3 ? fdiv(g[1], 16) : g[2];
      w4 = ctrl.c4 ? fdiv(g[0], 4096) : ctrl.c5 ? fdiv(g[1], 256) : ctrl.c6 ? fdiv(g[2], 16) : g[3];
      // operand isolation: an adder whose sum reaches no output must rest at 0
      begin
        bit nd [4];
        nd[0] = 1;
        nd[1] = !ctrl.c1 || (ctrl.c3 && !ctrl.c2) || (ctrl.c5 && !ctrl.c4);
        nd[2] = (!ctrl.c2 && !ctrl.c3) || (ctrl.c6 && !ctrl.c4 && !ctrl.c5);
        nd[3] = !ctrl.c4 && !ctrl.c5 && !ctrl.c6;
        for (int j = 1; j < 4; j++) begin
          int sj;
          sj = int'(dut.s[j]);
          checks++;
          if (!nd[j]) n_idle++;
          if (nd[j] ? (sj != g[j]) : (sj != 0)) begin
            failures++;
            if (failures < 10) $display("FAIL ctrl=%b: adder %0d gives %0d, needed=%b", ctrl, j + 1, sj, nd[j]);
          end
        end
      end
      checks++;
      if (int'(as1) != g[0] || int'(as2) != w2 || int'(as3) != w3 || int'(as4) != w4) begin
        failures++;
        if (failures < 10)
          $display("FAIL ctrl=%b: %0d %0d %0d %0d want %0d %0d %0d %0d",
                   ctrl, as1, as2, as3, as4, g[0], w2, w3, w4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
