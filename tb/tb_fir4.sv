// tb_fir4: self-checking test of the 4-tap FIR filter.
//
// Inputs are driven on the falling clock edge.  A reference model, run on
// every rising edge, mirrors the filter's handshake: when in_ready is high
// it loads new coefficients (coef_we) and accepts a sample (in_valid),
// computes the expected y(n) = sum h(k) x(n-k) modulo 2^16 from its own
// copy of the sample history, and queues it with the accepting cycle.
// Each out_valid pulse is compared with the head of the queue, and the
// distance from the accepting edge to the output edge must be 8 cycles.
// The stimulus starts with an impulse through known coefficients
// (1, 2, 3, 4 must come out in order), then random samples with random
// gaps, random coefficient reloads and large values that make the 16-bit
// sum wrap.  The test counts each of those events and fails if one never
// happened, or if any accepted sample produced no output.
`timescale 1ns/1ps
module tb_fir4;
  localparam int TAPS = 4;
  localparam int LAT  = 2 * TAPS;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              in_valid = 1'b0, in_ready, coef_we = 1'b0, out_valid;
  logic signed [7:0] x_in = '0;
  logic signed [7:0] coef_in [TAPS];
  logic signed [15:0] y_out;

  int checks = 0, failures = 0;
  int n_reload = 0, n_gap = 0, n_wrap = 0, n_out = 0, n_in = 0;
  longint cyc = 0;

  fir4 dut (.clk, .rst_n, .in_valid, .in_ready, .x_in, .coef_we, .coef_in,
            .out_valid, .y_out);

  always #5 clk = ~clk;

  // ------------------------------------------------------ reference model
  int          h_ref [TAPS];
  int          hist  [TAPS];
  logic [15:0] exp_q [$];
  longint      cyc_q [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_ready) begin
        if (coef_we) begin
          for (int k = 0; k < TAPS; k++) h_ref[k] = int'(coef_in[k]);
          n_reload++;
        end
        if (in_valid) begin
          automatic int acc = 0;
          for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
          hist[0] = int'(x_in);
          for (int k = 0; k < TAPS; k++) acc += h_ref[k] * hist[k];
          if (acc > 32767 || acc < -32768) n_wrap++;
          exp_q.push_back(16'(acc));
          cyc_q.push_back(cyc);
          n_in++;
        end else begin
          n_gap++;
        end
      end
      if (out_valid) begin
        checks++;
        n_out++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected output %0d", y_out);
        end else begin
          automatic logic [15:0] e = exp_q.pop_front();
          automatic longint c0 = cyc_q.pop_front();
          if (y_out !== e) begin
            failures++;
            if (failures <= 10) $display("FAIL y=%0d expected %0d", y_out, $signed(e));
          end
          checks++;
          if (cyc - 1 - c0 != longint'(LAT)) begin
            failures++;
            if (failures <= 10) $display("FAIL latency %0d cycles, expected %0d", cyc - 1 - c0, LAT);
          end
        end
      end
    end
  end

  // -------------------------------------------------------------- stimulus
  task automatic wait_ready();
    do @(negedge clk); while (!in_ready);
  endtask

  task automatic drive(input logic v, input logic signed [7:0] x, input logic we);
    wait_ready();
    in_valid = v; x_in = x; coef_we = we;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < TAPS; k++) begin
      coef_in[k] = 8'(k + 1);
      h_ref[k] = 0;
      hist[k] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // impulse response through h = 1, 2, 3, 4
    drive(1'b1, 8'sd1, 1'b1);
    for (int i = 0; i < 6; i++) drive(1'b1, 8'sd0, 1'b0);
    // random operation
    for (int i = 0; i < 3000; i++) begin
      automatic logic we = ($urandom_range(0, 19) == 0);
      if (we)
        for (int k = 0; k < TAPS; k++)
          coef_in[k] = ($urandom_range(0, 3) == 0) ? 8'sh80 : 8'($urandom);
      drive($urandom_range(0, 3) != 0,
            ($urandom_range(0, 3) == 0) ? 8'sh80 : 8'($urandom), we);
    end
    drive(1'b0, 8'sd0, 1'b0);
    repeat (4 * LAT) @(negedge clk);
    // the impulse must have come out as 1, 2, 3, 4 (checked by the model);
    // every accepted sample must have produced an output
    checks++;
    if (exp_q.size() != 0 || n_out != n_in) begin
      failures++;
      $display("FAIL %0d samples in, %0d outputs", n_in, n_out);
    end
    checks++;
    if (n_reload < 2) begin failures++; $display("FAIL coefficient reload never happened"); end
    checks++;
    if (n_gap < 1)    begin failures++; $display("FAIL no input gap happened"); end
    checks++;
    if (n_wrap < 1)   begin failures++; $display("FAIL 16-bit wrap never happened"); end
    $display("samples %0d, outputs %0d, reloads %0d, gaps %0d, wraps %0d",
             n_in, n_out, n_reload, n_gap, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_fir4
