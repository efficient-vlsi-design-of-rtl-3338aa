// tb_coef_lut: checks the coefficient LUT: reset clears every entry, a write
// changes only the addressed entry and is visible right after its clock edge,
// and entries hold their value while we is low. Compared with a shadow array.
module tb_coef_lut;
  import vh_pkg::*;
  localparam int unsigned TAPS = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, we = 0;
  logic [$clog2(TAPS)-1:0] waddr = '0;
  coef_t wdata = '0;
  coef_t coef [TAPS];
  coef_t shadow [TAPS];

  coef_lut #(.TAPS(TAPS)) dut (.clk(clk), .rst(rst), .we(we), .waddr(waddr), .wdata(wdata), .coef(coef));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (coef[k] !== shadow[k]) begin
        failures++;
        if (failures < 10) $display("FAIL entry %0d: %h want %h", k, coef[k], shadow[k]);
      end
    end
  endtask

  initial begin
    foreach (shadow[k]) shadow[k] = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    compare();
    for (int i = 0; i < 1000; i++) begin
      we    = 1'($urandom_range(0, 3) != 0);
      waddr = $clog2(TAPS)'($urandom);
      wdata = HW'($urandom);
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      @(negedge clk);
      compare();
    end
    we = 0;
    rst = 1;
    @(negedge clk);
    foreach (shadow[k]) shadow[k] = '0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
