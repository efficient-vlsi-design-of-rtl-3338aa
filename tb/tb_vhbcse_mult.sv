// tb_vhbcse_mult: checks the whole multiplier.
// Every vector is compared bit for bit with the integer reference model
// (tb_ref_pkg::ref_mult) and, independently, against the exact product
// x*h/2^16, which the truncated result must approach within MAX_ERR units.
// Vectors: coefficients built from repeated nibbles and bytes (to take every
// reuse path C1..C7), small negative and large positive coefficients, full-scale
// corners (the largest products) and random pairs. Each reuse path, the '11' group, the negative
// coefficient path must occur at least once.
module tb_vhbcse_mult;
  import vh_pkg::*;
  import tb_ref_pkg::*;
  localparam real MAX_ERR = 5.0;
  int checks = 0, failures = 0;
  int cnt_reuse [1:7];
  int cnt_neg = 0, cnt_11 = 0;
  real worst = 0.0;

  sample_t xin;
  coef_t   h;
  prod_t   y;

  vhbcse_mult dut (.xin(xin), .h(h), .y(y));

  task automatic apply(int hv, int xv);
    ref_flags_t fl;
    int  want;
    real err;
    h = HW'(hv); xin = XW'(xv);
    #1;
    want = ref_mult(hv, xv, fl);
    err  = real'(int'(y)) - exact_prod(hv, xv);
    if (err < 0) err = -err;
    if (err > worst) worst = err;
    for (int i = 1; i <= 7; i++) cnt_reuse[i] += int'(fl.reuse[i]);
    cnt_neg += int'(fl.neg_coef);
    cnt_11  += int'(fl.pat11);
    checks += 2;
    if (int'(y) != want) begin
      failures++;
      if (failures < 10) $display("FAIL h=%0d x=%0d: y=%0d model %0d", hv, xv, y, want);
    end
    if (err > MAX_ERR) begin
      failures++;
      if (failures < 10) $display("FAIL h=%0d x=%0d: y=%0d exact %f", hv, xv, y, exact_prod(hv, xv));
    end
  endtask

  function automatic int sext17(int v);
    return (v >= 65536) ? v - 131072 : v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int corner_x [6] = '{-32768, -32767, -1, 0, 1, 32767};
    int corner_h [8] = '{-65536, -65535, -1, 0, 1, 65535, 32768, -32768};
    foreach (cnt_reuse[i]) cnt_reuse[i] = 0;
    foreach (corner_h[i]) foreach (corner_x[j]) apply(corner_h[i], corner_x[j]);
    // coefficients with chosen nibble patterns a.b.c.d
    for (int i = 0; i < 4000; i++) begin
      int n [4], hv, pat;
      pat = i % 8;
      for (int j = 0; j < 4; j++) n[j] = int'($urandom_range(0, 15));
      case (pat)
        0: n[1] = n[0];
        1: n[2] = n[0];
        2: n[2] = n[1];
        3: n[3] = n[0];
        4: n[3] = n[1];
        5: n[3] = n[2];
        6: begin n[2] = n[0]; n[3] = n[1]; end
        default: ;
      endcase
      hv = n[0] * 4096 + n[1] * 256 + n[2] * 16 + n[3];
      if ($urandom_range(0, 1) == 1) hv = -hv - 1;  // same Hm, negative coefficient
      apply(hv, int'($urandom_range(0, 65535)) - 32768);
    end
    // small negative and large positive coefficients
    for (int i = 0; i < 2000; i++) begin
      apply(-int'($urandom_range(1, 300)), int'($urandom_range(0, 65535)) - 32768);
      apply(65535 - int'($urandom_range(0, 300)), int'($urandom_range(0, 65535)) - 32768);
    end
    for (int i = 0; i < 20000; i++)
      apply(sext17(int'($urandom_range(0, 131071))), int'($urandom_range(0, 65535)) - 32768);
    for (int i = 1; i <= 7; i++) begin
      checks++;
      if (cnt_reuse[i] == 0) begin failures++; $display("reuse C%0d never taken", i); end
    end
    checks++;
    if (cnt_neg == 0 || cnt_11 == 0) begin
      failures++;
      $display("neg=%0d pat11=%0d", cnt_neg, cnt_11);
    end
    $display("worst error vs exact product: %f", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
