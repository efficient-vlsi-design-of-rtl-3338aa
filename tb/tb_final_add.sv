// tb_final_add: checks the layer-4 addition p = floor((AS5 + AS6) / 2) over the
// operand range the multiplier produces (sum within [-65536, 65535]), with both
// ends of that range and random values in between.
module tb_final_add;
  import vh_pkg::*;
  int checks = 0, failures = 0;
  logic signed [T1W-1:0] as5;
  logic signed [T2W-1:0] as6;
  prod_t                 p;

  final_add dut (.as5(as5), .as6(as6), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int v5, v6, w;
      v6 = int'($urandom_range(0, 1023)) - 512;
      case (i % 4)
        0: v5 = -65536 - v6;           // lowest sum
        1: v5 = 65535 - v6;            // highest sum
        default: v5 = int'($urandom_range(0, 130047)) - 65024;
      endcase
      as5 = T1W'(v5); as6 = T2W'(v6);
      #1;
      w = int'($floor(real'(v5 + v6) / 2.0));
      checks++;
      if (int'(p) != w) begin
        failures++;
        if (failures < 10) $display("FAIL %0d + %0d: %0d want %0d", v5, v6, p, w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
