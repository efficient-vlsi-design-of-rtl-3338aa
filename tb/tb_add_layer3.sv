// tb_add_layer3: checks the layer-3 controlled addition on random in-range
// layer-2 sums with C7 low and high: AS5 = AS1 + AS2, AS6 = AS3 + AS4 or
// floor((AS1 + AS2) / 256); while C7 is set the AS3 + AS4 adder must rest at 0.
module tb_add_layer3;
  import vh_pkg::*;
  int checks = 0, failures = 0;
  logic signed [AS1W-1:0] as1;
  logic signed [AS2W-1:0] as2;
  logic signed [AS3W-1:0] as3;
  logic signed [AS4W-1:0] as4;
  logic                   c7;
  logic signed [T1W-1:0]  as5;
  logic signed [T2W-1:0]  as6;

  add_layer3 dut (.as1(as1), .as2(as2), .as3(as3), .as4(as4), .c7(c7), .as5(as5), .as6(as6));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int v1, v2, v3, v4, w5, w6;
      v1 = int'($urandom_range(0, 131071)) - 65536;
      v2 = int'($urandom_range(0, 8191)) - 4096;
      v3 = int'($urandom_range(0, 511)) - 256;
      v4 = int'($urandom_range(0, 31)) - 16;
      if (i == 0) begin v1 = -65536; v2 = -4096; v3 = -256; v4 = -16; end
      if (i == 1) begin v1 = 65535;  v2 = 4095;  v3 = 255;  v4 = 15;  end
      as1 = AS1W'(v1); as2 = AS2W'(v2); as3 = AS3W'(v3); as4 = AS4W'(v4);
      c7 = 1'(i % 2);
      #1;
      w5 = v1 + v2;
      w6 = c7 ? int'($floor(real'(w5) / 256.0)) : v3 + v4;
      checks++;
      if (c7 && dut.t2 != 0) begin
        failures++;
        if (failures < 10) $display("FAIL: T2 adder not isolated while C7 is set");
      end
      checks++;
      if (int'(as5) != w5 || int'(as6) != w6) begin
        failures++;
        if (failures < 10) $display("FAIL c7=%b: %0d %0d want %0d %0d", c7, as5, as6, w5, w6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
