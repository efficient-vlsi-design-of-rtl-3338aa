// tb_cl_gen: exhaustive check of the control logic generator. For every 16-bit
// Hm the seven flags must match nibble/byte equality computed with integer
// division; the all-ones word must raise all seven flags.
module tb_cl_gen;
  import vh_pkg::*;
  int checks = 0, failures = 0;
  hmag_t hm;
  ctrl_t ctrl;
  int    seen [1:7];

  cl_gen dut (.hm(hm), .ctrl(ctrl));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int v = 0; v < 65536; v++) begin
      int n0, n1, n2, n3;
      bit [7:1] want, got;
      hm = MW'(v);
      #1;
      n0 = v / 4096; n1 = (v / 256) % 16; n2 = (v / 16) % 16; n3 = v % 16;
      want[1] = n0 == n1; want[2] = n0 == n2; want[3] = n1 == n2;
      want[4] = n0 == n3; want[5] = n1 == n3; want[6] = n2 == n3;
      want[7] = (v / 256) == (v % 256);
      got = {ctrl.c7, ctrl.c6, ctrl.c5, ctrl.c4, ctrl.c3, ctrl.c2, ctrl.c1};
      for (int i = 1; i <= 7; i++) seen[i] += int'(got[i]);
      checks++;
      if (got !== want) begin
        failures++;
        if (failures < 10) $display("FAIL hm=%h: %b want %b", v, got, want);
      end
    end
    hm = 16'hFFFF;
    #1;
    checks++;
    if (ctrl !== 7'b111_1111) failures++;
    for (int i = 1; i <= 7; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("flag C%0d never raised", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
