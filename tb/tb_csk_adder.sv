// tb_csk_adder: checks the carry-skip adder against the '+' operator.
// An 8-bit instance (blocks of 3, so the last block is partial) is run
// exhaustively over a, b and cin; a 16-bit instance with the default block size
// is run on random operands plus all-propagate patterns that take every skip path.
module tb_csk_adder;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [15:0] a16, b16, s16;
  logic        ci16, co16;

  csk_adder #(.WIDTH(8), .BLOCK(3)) dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));
  csk_adder dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));

  task automatic check16(logic [15:0] a, logic [15:0] b, logic c);
    logic [16:0] want;
    a16 = a; b16 = b; ci16 = c;
    #1;
    want = 17'(a) + 17'(b) + 17'(c);
    checks++;
    if ({co16, s16} !== want) begin
      failures++;
      if (failures < 10) $display("FAIL 16: %h + %h + %b = %h, want %h", a, b, c, {co16, s16}, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++)
        for (int c = 0; c < 2; c++) begin
          logic [8:0] want;
          a8 = 8'(a); b8 = 8'(b); ci8 = 1'(c);
          #1;
          want = 9'(a + b + c);
          checks++;
          if ({co8, s8} !== want) begin
            failures++;
            if (failures < 10) $display("FAIL 8: %0d + %0d + %0d = %0d", a, b, c, {co8, s8});
          end
        end
    // all-propagate operands: carry-in must cross every block through the skip path
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hAAAA, 16'h5555, 1'b1);
    check16(16'hAAAA, 16'h5555, 1'b0);
    check16(16'h0FF0, 16'h000F, 1'b1);
    for (int i = 0; i < 20000; i++) check16(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
