// tb_booth_mult_r8: self-checking test of the radix-8 Booth multiplier.
// The default 8 x 8 instance is checked exhaustively (all 65536 operand
// pairs) against the simulator's own signed multiplication.  A 10-bit
// instance is checked on the worked example of the radix-8 method,
// 148 x 394 = 58312, where the multiplier recodes to the digits
// 2, 1, -2, 1 (least significant first), and on random 10-bit operands.
`timescale 1ns/1ps
module tb_booth_mult_r8;
  logic signed [7:0]  a8, b8;
  logic signed [15:0] p8;
  logic signed [9:0]  a10, b10;
  logic signed [19:0] p10;
  int checks = 0, failures = 0;

  booth_mult_r8 #(.N(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  booth_mult_r8 #(.N(10)) dut10 (.a(a10), .b(b10), .p(p10));

  task automatic check10(input logic signed [9:0] ta, input logic signed [9:0] tb);
    logic signed [19:0] exp;
    a10 = ta; b10 = tb; #1;
    exp = 20'(ta) * 20'(tb);
    checks++;
    if (p10 !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL10 %0d * %0d: got %0d expected %0d", ta, tb, p10, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a10 = '0; b10 = '0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        logic signed [15:0] exp;
        a8 = 8'(i); b8 = 8'(j); #1;
        exp = 16'(a8) * 16'(b8);
        checks++;
        if (p8 !== exp) begin
          failures++;
          if (failures <= 10) $display("FAIL8 %0d * %0d: got %0d expected %0d", a8, b8, p8, exp);
        end
      end
    end
    // worked example: x = 0010010100 (148), y = 0110001010 (394)
    check10(10'b0010010100, 10'b0110001010);
    checks++;
    if (p10 !== 20'sd58312) begin
      failures++;
      $display("FAIL worked example: got %0d", p10);
    end
    for (int i = 0; i < 2000; i++) check10(10'($urandom), 10'($urandom));
    check10(10'sh200, 10'sh200);
    check10(10'sh200, 10'sh1FF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_booth_mult_r8
