// tb_fir8_vhbcse: end-to-end test of the 8-tap reconfigurable FIR filter at its
// default size.
//
// A scoreboard keeps its own transposed-form model (sample, coefficient table,
// partial sums), updated at each clock edge exactly as the filter's interface
// promises, with products from tb_ref_pkg::ref_mult. In steady state (no
// coefficient change within the last eight samples) that equals the direct
// form sum_k mult(h[k], x[n-k]); this is checked separately on a window of
// outputs after the last reconfiguration. Outputs are checked
// for value and for arrival one clock after the sample edge. The stimulus runs
// several coefficient sets, rewritten while samples keep streaming
// (reconfiguration), with gaps in x_valid (stalls) and one mid-run reset. The
// test counts, over the products that reach an output, how often each
// horizontal reuse path C1..C7, the negative-coefficient path and the '11'
// pattern occurred, plus reconfigurations, stalls and
// resets, and fails if any of them never happened.
module tb_fir8_vhbcse;
  import vh_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned TAPS = 8;
  localparam int unsigned OW   = 19;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic x_valid = 0, coef_we = 0;
  sample_t xin = '0;
  logic [2:0] coef_addr = '0;
  coef_t coef_wdata = '0;
  logic y_valid;
  logic signed [OW-1:0] yn;

  fir8_vhbcse dut (
    .clk(clk), .rst(rst), .x_valid(x_valid), .xin(xin),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_wdata(coef_wdata),
    .y_valid(y_valid), .yn(yn)
  );

  always #5 clk = ~clk;

  // scoreboard state: a transposed-form model with its own partial sums
  int  m_x = 0;
  int  m_h [TAPS];
  int  m_z [TAPS+1];
  bit  m_tv = 0;
  int  exp_q [$];
  int  cycle = 0;
  int  n_out = 0, n_reconf = 0, n_stall = 0, n_reset = 0;
  int  cnt_reuse [1:7];
  int  cnt_neg = 0, cnt_11 = 0;
  int  m_xh [$];        // processed samples, newest first (direct-form cross-check)
  int  m_since = 0;     // steps since the last coefficient write or reset
  int  n_direct = 0;

  // one enabled step of the chain: returns the output, updates the partial sums
  function automatic int step();
    int p [TAPS];
    int out;
    ref_flags_t fl;
    for (int k = 0; k < TAPS; k++) begin
      p[k] = ref_mult(m_h[k], m_x, fl);
      for (int i = 1; i <= 7; i++) cnt_reuse[i] += int'(fl.reuse[i] && m_h[k] != 0);
      cnt_neg += int'(fl.neg_coef);
      cnt_11  += int'(fl.pat11);
    end
    out = p[0] + m_z[1];
    for (int k = 1; k < TAPS; k++) m_z[k] = p[k] + m_z[k+1];
    m_xh.push_front(m_x);
    if (m_xh.size() > TAPS) void'(m_xh.pop_back());
    m_since++;
    if (m_since >= TAPS) begin
      int direct = 0;
      for (int k = 0; k < TAPS; k++) direct += ref_mult(m_h[k], m_xh[k], fl);
      n_direct++;
      checks++;
      if (direct != out) begin
        failures++;
        if (failures < 10) $display("FAIL direct-form sum %0d, transposed model %0d", direct, out);
      end
    end
    return out;
  endfunction

  always @(posedge clk) begin
    cycle++;
    if (rst) begin
      m_x = 0;
      foreach (m_h[k]) m_h[k] = 0;
      foreach (m_z[k]) m_z[k] = 0;
      m_xh.delete();
      m_since = 0;
      m_tv = 0;
      exp_q.delete();
    end else begin
      if (m_tv) exp_q.push_back(step());
      m_tv = x_valid;
      if (coef_we) begin
        m_h[coef_addr] = int'(coef_wdata);
        m_since = 0;
      end
      if (x_valid) m_x = int'(xin);
    end
  end

  always @(negedge clk) begin
    if (!rst) begin
      checks++;
      if (y_valid != (exp_q.size() == 1)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: y_valid=%b expected %0d outputs", cycle, y_valid, exp_q.size());
      end
      if (y_valid && exp_q.size() > 0) begin
        int want;
        want = exp_q.pop_front();
        n_out++;
        checks++;
        if (int'(yn) != want) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: yn=%0d want %0d", cycle, yn, want);
        end
      end
      exp_q.delete();
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // coefficient sets (17-bit two's complement, value/65536)
  int set_lp  [TAPS] = '{-1200, 2400, 9800, 20000, 20000, 9800, 2400, -1200};
  int set_rep [TAPS] = '{'h1111, 'h1212, 'h3434, -'h5656, 'hABCD, 'h0F0F, 'hFFFF, -'h10000};
  int set_neg [TAPS] = '{-3, -40, -700, -9000, 60000, 65000, 65535, -65536};

  task automatic load_set(int s [TAPS], bit keep_streaming);
    for (int k = 0; k < TAPS; k++) begin
      @(negedge clk);
      coef_we    = 1;
      coef_addr  = 3'(k);
      coef_wdata = HW'(s[k]);
      if (keep_streaming) begin
        x_valid = 1;
        xin     = XW'(int'($urandom_range(0, 65535)) - 32768);
      end else x_valid = 0;
    end
    @(negedge clk);
    coef_we = 0;
    x_valid = 0;
    n_reconf++;
  endtask

  task automatic stream(int n, int mode);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      x_valid = ($urandom_range(0, 4) != 0);
      if (!x_valid) n_stall++;
      case (mode)
        0: xin = XW'(int'($urandom_range(0, 65535)) - 32768);
        1: xin = (i % 2) ? 16'sh7FFF : -16'sh8000;   // full-scale square wave
        default: xin = (i % 3 == 0) ? 16'hFF00 : XW'(int'($urandom_range(0, 255)));
      endcase
    end
    @(negedge clk);
    x_valid = 0;
  endtask

  initial begin
    foreach (cnt_reuse[i]) cnt_reuse[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    load_set(set_lp, 0);
    stream(300, 0);
    load_set(set_rep, 1);
    stream(300, 0);
    stream(50, 2);
    load_set(set_neg, 1);
    stream(100, 1);
    stream(300, 0);
    // mid-run reset, then reload with random coefficients
    @(negedge clk);
    rst = 1;
    n_reset++;
    @(negedge clk);
    rst = 0;
    begin
      int rs [TAPS];
      foreach (rs[k]) rs[k] = int'($urandom_range(0, 131071)) - 65536;
      load_set(rs, 1);
    end
    stream(300, 0);
    repeat (4) @(negedge clk);
    for (int i = 1; i <= 7; i++) begin
      checks++;
      if (cnt_reuse[i] == 0) begin failures++; $display("reuse C%0d never happened", i); end
    end
    checks++;
    if (cnt_neg == 0 || cnt_11 == 0 || n_reconf < 3 || n_stall == 0 || n_reset == 0 || n_direct < 500 || n_out < 1000) begin
      failures++;
    end
    $display("outputs=%0d direct-form cross-checks=%0d reconfigurations=%0d stalls=%0d resets=%0d", n_out, n_direct, n_reconf, n_stall, n_reset);
    $display("reuse C1..C7 = %0d %0d %0d %0d %0d %0d %0d", cnt_reuse[1], cnt_reuse[2], cnt_reuse[3],
             cnt_reuse[4], cnt_reuse[5], cnt_reuse[6], cnt_reuse[7]);
    $display("negative-coef products=%0d pattern-11 products=%0d", cnt_neg, cnt_11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
