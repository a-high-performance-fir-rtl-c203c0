// tb_csla_dlatch: self-checking test of the 16-bit D-latch carry-select
// adder.  Each addition is driven as the adder expects: operands applied,
// one en = 1 phase (latch captures the carry-in-1 group results), then one
// en = 0 phase after which {cout, sum} is compared with a + b + cin computed
// by the testbench's own integer arithmetic.  Corner cases (carries that
// ripple through every group, all ones, zero) come first, then random
// operands.  A watchdog ends the run if it stalls.
`timescale 1ns/1ps
module tb_csla_dlatch;
  localparam int unsigned W = 16;

  logic         en;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  csla_dlatch #(.WIDTH(W)) dut (.en, .a, .b, .cin, .sum, .cout);

  task automatic add_check(input logic [W-1:0] ta, input logic [W-1:0] tb, input logic tc);
    logic [W:0] exp;
    a = ta; b = tb; cin = tc;
    en = 1'b1; #5;
    en = 1'b0; #5;
    exp = {1'b0, ta} + {1'b0, tb} + {{W{1'b0}}, tc};
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %h + %h + %b: got %h expected %h", ta, tb, tc, {cout, sum}, exp);
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
    en = 1'b0; a = '0; b = '0; cin = 1'b0;
    #5;
    add_check(16'h0000, 16'h0000, 1'b0);
    add_check(16'hFFFF, 16'h0000, 1'b1);
    add_check(16'hFFFF, 16'hFFFF, 1'b1);
    add_check(16'h7FFF, 16'h0001, 1'b0);
    add_check(16'h0003, 16'h0001, 1'b0);   // carry out of group 0 only
    add_check(16'h000F, 16'h0001, 1'b0);
    add_check(16'h007F, 16'h0001, 1'b0);
    add_check(16'h07FF, 16'h0001, 1'b0);
    for (int i = 0; i < W; i++) begin    // carry injected at every position
      add_check(16'hFFFF >> i, 16'h0001 << (W - 1 - i), 1'b0);
      add_check(16'h1 << i, 16'h1 << i, 1'b1);
    end
    for (int i = 0; i < 5000; i++)
      add_check(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_csla_dlatch
