// fir4: direct-form FIR filter y(n) = sum_{k=0}^{TAPS-1} h(k) * x(n-k),
// with TAPS = 4, 8-bit signed samples and coefficients and a 16-bit
// accumulation path (the published configuration).
//
// Structure.  A tapped delay line holds x(n) .. x(n-3).  Every tap feeds a
// radix-8 Booth multiplier (booth_mult_r8) with its coefficient h(k); the
// four products are summed by a chain of three D-latch carry-select adders
// (csla_dlatch): ((h0 x(n) + h1 x(n-1)) + h2 x(n-2)) + h3 x(n-3).  Registers
// after the multipliers and after every adder pipeline the chain; the
// products entering later adders are delayed to stay aligned with their
// partial sum.
//
// Sample period.  The D-latch adders need their operands held for a
// latch phase (en = 1) and an evaluate phase (en = 0).  A phase bit toggles
// every clock and drives `en` of all adders; all pipeline registers advance
// on the clock edge that ends an evaluate phase (a "slot").  So the filter
// accepts one sample, and delivers one result, every 2 clock cycles.
//
// Interface.
//   in_ready  high in the cycle in which x_in / coef_in may be taken
//             (every other cycle); a sample is accepted when in_valid and
//             in_ready are both high at a rising clock edge.
//   coef_we   with in_ready, loads coef_in[k] into h(k); the new
//             coefficients apply to the sample accepted at the same edge
//             and to all later ones, so coefficients can be changed while
//             the filter runs.
//   y_out     the filtered value, signed, modulo 2^ACC_W (the 16-bit adders
//             wrap; carry-outs are not used).  out_valid pulses for one cycle
//             when a new value appears and y_out then holds for 2 cycles.
//   Latency   TAPS slots = 2*TAPS clock cycles from the accepting edge to the
//             edge after which out_valid is high (8 cycles for 4 taps).
//   Reset     active-low asynchronous rst_n clears the delay line, the
//             coefficients (all zero) and the valid flags.
// The tap count, widths, multiplier and adder types and the adder chain
// follow the published filter; the two-cycle sample period, the handshake,
// the pipeline registers and the coefficient-load port are this design's own.
module fir4 #(
  parameter int unsigned TAPS   = 4,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ACC_W  = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] x_in,
  input  logic                     coef_we,
  input  logic signed [DATA_W-1:0] coef_in [TAPS],
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  y_out
);
  localparam int unsigned PROD_W = 2 * DATA_W;

  if (TAPS < 2) begin : g_chk_taps
    $error("fir4: TAPS must be at least 2");
  end
  if (ACC_W < 2 * DATA_W) begin : g_chk_acc
    $error("fir4: ACC_W must hold a full product");
  end

  typedef logic signed [ACC_W-1:0] acc_t;

  // ---------------------------------------------------------------- phase
  logic phase;      // 1: latch phase, 0: evaluate phase
  logic slot_end;   // this edge ends an evaluate phase: pipeline advances

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= 1'b1;
    else        phase <= ~phase;
  end

  assign slot_end = ~phase;
  assign in_ready = ~phase;

  // ---------------------------------------------- delay line, coefficients
  logic signed [DATA_W-1:0] x_tap [TAPS];
  logic signed [DATA_W-1:0] h     [TAPS];
  logic                     v_tap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) begin
        x_tap[k] <= '0;
        h[k]     <= '0;
      end
      v_tap <= 1'b0;
    end else if (slot_end) begin
      v_tap <= in_valid;
      if (in_valid) begin
        x_tap[0] <= x_in;
        for (int k = 1; k < TAPS; k++) x_tap[k] <= x_tap[k-1];
      end
      if (coef_we) h <= coef_in;
    end
  end

  // ------------------------------------------------------------ multipliers
  logic signed [PROD_W-1:0] prod_c [TAPS];
  acc_t                     prod_q [TAPS];
  logic                     v_prod;

  for (genvar k = 0; k < TAPS; k++) begin : g_mul
    booth_mult_r8 #(.N(DATA_W)) u_mul (
      .a(x_tap[k]),
      .b(h[k]),
      .p(prod_c[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) prod_q[k] <= '0;
      v_prod <= 1'b0;
    end else if (slot_end) begin
      for (int k = 0; k < TAPS; k++) prod_q[k] <= acc_t'(prod_c[k]);
      v_prod <= v_tap;
    end
  end

  // -------------------------------------------------------------- adder chain
  // Stage s (1 .. TAPS-1) adds product s, delayed by s-1 slots, to the
  // registered partial sum of stage s-1 (stage 0 is product 0 itself).
  acc_t psum  [TAPS];   // psum[s]: registered output of stage s
  logic v_sum [TAPS];

  assign psum[0]  = prod_q[0];
  assign v_sum[0] = v_prod;

  for (genvar s = 1; s < TAPS; s++) begin : g_add
    acc_t dl [s];       // dl[d]: product s delayed by d slots
    acc_t add_c;
    logic unused_cout;

    assign dl[0] = prod_q[s];
    for (genvar d = 1; d < s; d++) begin : g_dl
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)        dl[d] <= '0;
        else if (slot_end) dl[d] <= dl[d-1];
      end
    end

    csla_dlatch #(.WIDTH(ACC_W)) u_add (
      .en  (phase),
      .a   (psum[s-1]),
      .b   (dl[s-1]),
      .cin (1'b0),
      .sum (add_c),
      .cout(unused_cout)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        psum[s]  <= '0;
        v_sum[s] <= 1'b0;
      end else if (slot_end) begin
        psum[s]  <= add_c;
        v_sum[s] <= v_sum[s-1];
      end
    end
  end

  // ------------------------------------------------------------------ output
  assign y_out = psum[TAPS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= slot_end & v_sum[TAPS-2];
  end

  // Handshake rules: a result is announced at most once per two-clock slot,
  // and only in the cycle right after a slot edge.
  a_out_once_per_slot: assert property (@(posedge clk) disable iff (!rst_n)
                                        out_valid |=> !out_valid);
  a_out_after_slot:    assert property (@(posedge clk) disable iff (!rst_n)
                                        out_valid |-> phase);
endmodule : fir4
