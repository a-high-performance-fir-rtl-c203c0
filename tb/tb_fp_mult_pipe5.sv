// tb_fp_mult_pipe5: self-checking test of the five-stage floating-point
// multiplier.  A new operand pair enters on every clock (with occasional
// idle cycles); the expected result is computed independently from the
// operand fields with a plain 24 x 24 integer multiply, normalisation,
// truncation and the same exceptional-value rules, and queued with the
// entry cycle.  Every output must match the head of the queue and arrive
// exactly five clocks after its operands were sampled.  Directed cases
// cover zero, infinity, NaN, overflow, underflow and products that need the
// normalising shift and those that do not; each class must occur.
`timescale 1ns/1ps
module tb_fp_mult_pipe5;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, out_valid;
  logic [31:0] a = '0, b = '0, result;
  int checks = 0, failures = 0;
  int n_shift = 0, n_noshift = 0, n_ovf = 0, n_unf = 0, n_special = 0;
  longint cyc = 0;

  fp_mult_pipe5 dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .result);

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_mul(input logic [31:0] x, input logic [31:0] y);
    logic        s = x[31] ^ y[31];
    int          ex = int'(x[30:23]), ey = int'(y[30:23]);
    logic        zx = (ex == 0), zy = (ey == 0);
    logic        ix = (ex == 255) && (x[22:0] == 0), iy = (ey == 255) && (y[22:0] == 0);
    logic        nx = (ex == 255) && (x[22:0] != 0), ny = (ey == 255) && (y[22:0] != 0);
    logic [47:0] p;
    int          e;
    logic [22:0] f;
    if (nx || ny || ((ix || iy) && (zx || zy))) begin n_special++; return 32'h7FC0_0000; end
    if (ix || iy) begin n_special++; return {s, 8'hFF, 23'd0}; end
    if (zx || zy) begin n_special++; return {s, 31'd0}; end
    p = 48'({1'b1, x[22:0]}) * 48'({1'b1, y[22:0]});
    e = ex + ey - 127;
    if (p[47]) begin f = p[46:24]; e++; n_shift++; end
    else       begin f = p[45:23]; n_noshift++; end
    if (e >= 255) begin n_ovf++; return {s, 8'hFF, 23'd0}; end
    if (e <= 0)   begin n_unf++; return {s, 31'd0}; end
    return {s, 8'(e), f};
  endfunction

  logic [31:0] exp_q [$];
  longint      cyc_q [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid) begin
        exp_q.push_back(ref_mul(a, b));
        cyc_q.push_back(cyc);
      end
      if (out_valid) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected output %h", result);
        end else begin
          automatic logic [31:0] e  = exp_q.pop_front();
          automatic longint      c0 = cyc_q.pop_front();
          if (result !== e) begin
            failures++;
            if (failures <= 10) $display("FAIL result %h expected %h", result, e);
          end
          checks++;
          if (cyc - c0 != 64'd5) begin
            failures++;
            if (failures <= 10) $display("FAIL latency %0d", cyc - c0);
          end
        end
      end
    end
  end

  function automatic logic [31:0] rnd_float(input int emin, input int emax);
    return {1'($urandom), 8'($urandom_range(emin, emax)), 23'($urandom)};
  endfunction

  task automatic put(input logic [31:0] x, input logic [31:0] y);
    @(negedge clk);
    in_valid = 1'b1; a = x; b = y;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    put(32'h3F80_0000, 32'h3F80_0000);   // 1.0 * 1.0
    put(32'h4000_0000, 32'hC040_0000);   // 2.0 * -3.0
    put(32'h3FC0_0000, 32'h3FC0_0000);   // 1.5 * 1.5 (normalising shift)
    put(32'h3FFF_FFFF, 32'h3FFF_FFFF);   // largest mantissas
    put(32'h0000_0000, 32'h4120_0000);   // 0 * 10
    put(32'h7F80_0000, 32'h4120_0000);   // inf * 10
    put(32'h7F80_0000, 32'h8000_0000);   // inf * -0
    put(32'h7FC0_0001, 32'h3F80_0000);   // NaN
    put(32'h7F00_0000, 32'h7F00_0000);   // overflow
    put(32'h0080_0000, 32'h0080_0000);   // underflow
    for (int i = 0; i < 4000; i++) begin
      if ($urandom_range(0, 9) == 0) begin
        @(negedge clk); in_valid = 1'b0;
      end else if ($urandom_range(0, 19) == 0) begin
        put(rnd_float(0, 255), rnd_float(0, 255));
      end else begin
        put(rnd_float(64, 190), rnd_float(64, 190));
      end
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    checks++;
    if (n_shift == 0 || n_noshift == 0 || n_ovf == 0 || n_unf == 0 || n_special == 0) begin
      failures++;
      $display("FAIL a case class never occurred");
    end
    $display("shift %0d, no shift %0d, overflow %0d, underflow %0d, special %0d",
             n_shift, n_noshift, n_ovf, n_unf, n_special);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_fp_mult_pipe5
