// tb_psum_chain: checks the transposed-form partial-sum chain. Random products
// (full 16-bit range, extremes included) arrive with random enables; a model
// keeps the history of enabled product vectors and predicts
// y = sum_k prod_{n-k}[k] after every enabled edge. Disabled edges must hold y,
// and reset must clear the chain.
module tb_psum_chain;
  localparam int unsigned TAPS = 8;
  localparam int unsigned PW   = 16;
  localparam int unsigned OW   = 19;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0;
  logic signed [PW-1:0] prod [TAPS];
  logic signed [OW-1:0] y;
  int hist [$][TAPS];  // hist[0] = newest enabled product vector
  int want = 0;

  psum_chain #(.TAPS(TAPS), .PW(PW), .OW(OW)) dut (.clk(clk), .rst(rst), .en(en), .prod(prod), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (prod[k]) prod[k] = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      int v [TAPS];
      for (int k = 0; k < TAPS; k++) begin
        case (i % 50)
          0: v[k] = -32768;
          1: v[k] = 32767;
          default: v[k] = int'($urandom_range(0, 65535)) - 32768;
        endcase
        prod[k] = PW'(v[k]);
      end
      en = (i % 50 < 20) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (en) begin
        hist.push_front(v);
        want = 0;
        for (int k = 0; k < TAPS && k < hist.size(); k++) want += hist[k][k];
        if (hist.size() > TAPS) void'(hist.pop_back());
      end
      @(negedge clk);
      checks++;
      if (int'(y) != want) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: y=%0d want %0d", i, y, want);
      end
    end
    rst = 1;
    @(negedge clk);
    rst = 0; en = 1;
    foreach (prod[k]) prod[k] = '0;
    @(negedge clk);
    checks++;
    if (y != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
