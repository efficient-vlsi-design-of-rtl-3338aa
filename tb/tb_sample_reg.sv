// tb_sample_reg: checks the input sample register: x_q takes xin at an enabled
// edge and holds it otherwise, x_q_valid reports whether the last edge loaded
// a sample, and reset clears both. Compared with a shadow copy.
module tb_sample_reg;
  import vh_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0;
  sample_t xin = '0;
  sample_t x_q;
  logic    x_q_valid;
  int      want_x = 0;
  bit      want_v = 0;

  sample_reg dut (.clk(clk), .rst(rst), .en(en), .xin(xin), .x_q(x_q), .x_q_valid(x_q_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (int'(x_q) != want_x || x_q_valid != want_v) begin
      failures++;
      if (failures < 10) $display("FAIL: x_q=%0d v=%b want %0d %b", x_q, x_q_valid, want_x, want_v);
    end
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    compare();
    for (int i = 0; i < 2000; i++) begin
      int v;
      v   = int'($urandom_range(0, 65535)) - 32768;
      en  = 1'($urandom_range(0, 2) != 0);
      xin = XW'(v);
      @(posedge clk);
      want_v = en;
      if (en) want_x = v;
      @(negedge clk);
      compare();
    end
    en = 1;
    rst = 1;
    @(negedge clk);
    want_x = 0; want_v = 0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
