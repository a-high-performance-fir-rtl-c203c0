// fir_system_top: top level of the arithmetic designs, side by side.
//
//   u_fir  4-tap FIR filter (fir4): 8-bit samples and coefficients,
//          radix-8 Booth multipliers, a chain of 16-bit D-latch
//          carry-select adders; one sample per two clocks, 8-clock latency,
//          coefficients reloadable while running.
//   u_fpm  five-stage pipelined single-precision multiplier
//          (fp_mult_pipe5) with a radix-8 Booth mantissa multiplier; one
//          operation per clock, 5-clock latency.
//
// The two units share only the clock and the asynchronous active-low reset;
// each has its own ports, prefixed fir_ and fpm_.  See the submodules for
// the handshake and timing of each port group.
module fir_system_top #(
  parameter int unsigned TAPS   = 4,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ACC_W  = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // FIR filter
  input  logic                     fir_in_valid,
  output logic                     fir_in_ready,
  input  logic signed [DATA_W-1:0] fir_x_in,
  input  logic                     fir_coef_we,
  input  logic signed [DATA_W-1:0] fir_coef_in [TAPS],
  output logic                     fir_out_valid,
  output logic signed [ACC_W-1:0]  fir_y_out,
  // floating-point multiplier
  input  logic                     fpm_in_valid,
  input  logic [31:0]              fpm_a,
  input  logic [31:0]              fpm_b,
  output logic                     fpm_out_valid,
  output logic [31:0]              fpm_result
);
  fir4 #(.TAPS(TAPS), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_fir (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (fir_in_valid),
    .in_ready (fir_in_ready),
    .x_in     (fir_x_in),
    .coef_we  (fir_coef_we),
    .coef_in  (fir_coef_in),
    .out_valid(fir_out_valid),
    .y_out    (fir_y_out)
  );

  fp_mult_pipe5 u_fpm (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (fpm_in_valid),
    .a        (fpm_a),
    .b        (fpm_b),
    .out_valid(fpm_out_valid),
    .result   (fpm_result)
  );
endmodule : fir_system_top
