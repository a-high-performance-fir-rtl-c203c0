// tb_fir_system_top: end-to-end test of the whole design at its default
// size (no parameter overrides): the 4-tap FIR filter and the pipelined
// floating-point multiplier are exercised at the same time.
//
// FIR side: an impulse through h = 1, 2, 3, 4, then random 8-bit samples
// with random idle slots, random coefficient reloads while data is in
// flight, and extreme values (-128) that make the 16-bit result wrap.
// Each output is checked against y(n) = sum h(k) x(n-k) mod 2^16 from a
// reference model, and must appear 8 clocks after its sample was accepted.
// FP side: one operand pair per clock (with idle cycles), checked against a
// field-level reference (24 x 24 integer multiply, normalise, truncate) and
// a latency of 5 clocks.  Directed cases give zero, infinity, NaN, overflow
// and underflow.  Every mechanism (reload, idle slot, wrap, normalising
// shift and its absence, overflow, underflow, special value) is counted and
// must occur at least once.
`timescale 1ns/1ps
module tb_fir_system_top;
  localparam int TAPS = 4;
  localparam int LAT  = 2 * TAPS;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               fir_in_valid = 1'b0, fir_in_ready, fir_coef_we = 1'b0, fir_out_valid;
  logic signed [7:0]  fir_x_in = '0;
  logic signed [7:0]  fir_coef_in [TAPS];
  logic signed [15:0] fir_y_out;
  logic               fpm_in_valid = 1'b0, fpm_out_valid;
  logic [31:0]        fpm_a = '0, fpm_b = '0, fpm_result;

  int checks = 0, failures = 0;
  int n_reload = 0, n_gap = 0, n_wrap = 0, n_out = 0, n_in = 0;
  int n_shift = 0, n_noshift = 0, n_ovf = 0, n_unf = 0, n_special = 0;
  bit fir_done = 1'b0, fpm_done = 1'b0;
  longint cyc = 0;

  fir_system_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------------ FIR model
  int          h_ref [TAPS];
  int          hist  [TAPS];
  logic [15:0] fir_q [$];
  longint      fir_c [$];

  always @(posedge clk) begin
    if (rst_n) begin
      if (fir_in_ready) begin
        if (fir_coef_we) begin
          for (int k = 0; k < TAPS; k++) h_ref[k] = int'(fir_coef_in[k]);
          n_reload++;
        end
        if (fir_in_valid) begin
          automatic int acc = 0;
          for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
          hist[0] = int'(fir_x_in);
          for (int k = 0; k < TAPS; k++) acc += h_ref[k] * hist[k];
          if (acc > 32767 || acc < -32768) n_wrap++;
          fir_q.push_back(16'(acc));
          fir_c.push_back(cyc);
          n_in++;
        end else begin
          n_gap++;
        end
      end
      if (fir_out_valid) begin
        checks++;
        n_out++;
        if (fir_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected FIR output %0d", fir_y_out);
        end else begin
          automatic logic [15:0] e  = fir_q.pop_front();
          automatic longint      c0 = fir_c.pop_front();
          if (fir_y_out !== e) begin
            failures++;
            if (failures <= 10) $display("FAIL y=%0d expected %0d", fir_y_out, $signed(e));
          end
          checks++;
          if (cyc - 1 - c0 != longint'(LAT)) begin
            failures++;
            if (failures <= 10) $display("FAIL FIR latency %0d", cyc - 1 - c0);
          end
        end
      end
    end
  end

  // ------------------------------------------------------------- FP model
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

  logic [31:0] fpm_q [$];
  longint      fpm_c [$];

  always @(posedge clk) begin
    if (rst_n) begin
      if (fpm_in_valid) begin
        fpm_q.push_back(ref_mul(fpm_a, fpm_b));
        fpm_c.push_back(cyc);
      end
      if (fpm_out_valid) begin
        checks++;
        if (fpm_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected FP output %h", fpm_result);
        end else begin
          automatic logic [31:0] e  = fpm_q.pop_front();
          automatic longint      c0 = fpm_c.pop_front();
          if (fpm_result !== e) begin
            failures++;
            if (failures <= 10) $display("FAIL FP result %h expected %h", fpm_result, e);
          end
          checks++;
          if (cyc - c0 != 64'd5) begin
            failures++;
            if (failures <= 10) $display("FAIL FP latency %0d", cyc - c0);
          end
        end
      end
    end
  end

  // -------------------------------------------------------------- stimulus
  task automatic fir_drive(input logic v, input logic signed [7:0] x, input logic we);
    do @(negedge clk); while (!fir_in_ready);
    fir_in_valid = v; fir_x_in = x; fir_coef_we = we;
  endtask

  task automatic fpm_put(input logic [31:0] x, input logic [31:0] y);
    @(negedge clk);
    fpm_in_valid = 1'b1; fpm_a = x; fpm_b = y;
  endtask

  function automatic logic [31:0] rnd_float(input int emin, input int emax);
    return {1'($urandom), 8'($urandom_range(emin, emax)), 23'($urandom)};
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : fir_stim
    for (int k = 0; k < TAPS; k++) begin
      fir_coef_in[k] = 8'(k + 1);
      h_ref[k] = 0;
      hist[k] = 0;
    end
    wait (rst_n);
    fir_drive(1'b1, 8'sd1, 1'b1);
    for (int i = 0; i < 6; i++) fir_drive(1'b1, 8'sd0, 1'b0);
    for (int i = 0; i < 3000; i++) begin
      automatic logic we = ($urandom_range(0, 19) == 0);
      if (we)
        for (int k = 0; k < TAPS; k++)
          fir_coef_in[k] = ($urandom_range(0, 3) == 0) ? 8'sh80 : 8'($urandom);
      fir_drive($urandom_range(0, 3) != 0,
                ($urandom_range(0, 3) == 0) ? 8'sh80 : 8'($urandom), we);
    end
    fir_drive(1'b0, 8'sd0, 1'b0);
    repeat (4 * LAT) @(negedge clk);
    fir_done = 1'b1;
  end

  initial begin : fpm_stim
    wait (rst_n);
    fpm_put(32'h3F80_0000, 32'h3F80_0000);
    fpm_put(32'h4000_0000, 32'hC040_0000);
    fpm_put(32'h3FC0_0000, 32'h3FC0_0000);
    fpm_put(32'h0000_0000, 32'h4120_0000);
    fpm_put(32'h7F80_0000, 32'h4120_0000);
    fpm_put(32'h7F80_0000, 32'h8000_0000);
    fpm_put(32'h7FC0_0001, 32'h3F80_0000);
    fpm_put(32'h7F00_0000, 32'h7F00_0000);
    fpm_put(32'h0080_0000, 32'h0080_0000);
    for (int i = 0; i < 4000; i++) begin
      if ($urandom_range(0, 9) == 0) begin
        @(negedge clk); fpm_in_valid = 1'b0;
      end else if ($urandom_range(0, 19) == 0) begin
        fpm_put(rnd_float(0, 255), rnd_float(0, 255));
      end else begin
        fpm_put(rnd_float(64, 190), rnd_float(64, 190));
      end
    end
    @(negedge clk); fpm_in_valid = 1'b0;
    repeat (10) @(negedge clk);
    fpm_done = 1'b1;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fir_done && fpm_done);
    checks++;
    if (fir_q.size() != 0 || n_out != n_in) begin
      failures++;
      $display("FAIL FIR: %0d samples in, %0d outputs", n_in, n_out);
    end
    checks++;
    if (fpm_q.size() != 0) begin failures++; $display("FAIL FP: %0d results missing", fpm_q.size()); end
    checks++;
    if (n_reload < 2 || n_gap == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a FIR mechanism never occurred");
    end
    checks++;
    if (n_shift == 0 || n_noshift == 0 || n_ovf == 0 || n_unf == 0 || n_special == 0) begin
      failures++;
      $display("FAIL an FP mechanism never occurred");
    end
    $display("FIR: samples %0d, outputs %0d, coefficient reloads %0d, idle slots %0d, wraps %0d",
             n_in, n_out, n_reload, n_gap, n_wrap);
    $display("FP:  shift %0d, no shift %0d, overflow %0d, underflow %0d, special %0d",
             n_shift, n_noshift, n_ovf, n_unf, n_special);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_fir_system_top
