// fp_mult_pipe5: IEEE-754 single-precision multiplier in five pipeline
// stages, with a radix-8 Booth mantissa multiplier.
//
// Pipeline (one register bank per stage, no stalls; a new operand pair may
// enter every clock and its product leaves five clocks later):
//   P1  pre-processing: split both operands into sign, exponent and 24-bit
//       mantissa (hidden bit restored), classify zero / infinity / NaN.
//   P2  sign = S1 xor S2, E_temp = E1 + E2, and the Booth processor: the
//       multiplier mantissa is recoded into 8 radix-8 digits (-4 .. +4) and
//       8 partial products d_k * M1 * 8^k are formed from 0, M1, 2M1, 3M1
//       (hard multiple) and 4M1.
//   P3  E_temp1 = E_temp - 127 (bias); the 8 partial products are
//       compressed to 4.
//   P4  the 4 partial products are compressed to 2.
//   P5  final carry-propagate adder (48-bit mantissa product) and
//       normalisation: when the product is >= 2 it is shifted right by one
//       and the exponent incremented.
//
// Eight radix-8 digits span bits 0 .. 23 of the multiplier mantissa, so the
// top digit reads bit 23 (the hidden 1) as a sign bit; the correction term
// M1 * 2^24 that restores the unsigned value is added during the 8-to-4
// compression.  Compression is done by plain additions of row pairs.
//
// Exceptional values, rounding: the stage split, the Booth recoding and
// the bias subtraction follow the published pipeline; everything below is
// this design's own choice.  Subnormal inputs are read as zero, results
// below the normal range are flushed to signed zero, results above it
// become signed infinity, NaN or inf*0 gives the quiet NaN 0x7FC00000,
// other infinities give signed infinity.  The mantissa is truncated (round
// toward zero).
//
// Interface: in_valid/a/b sampled at a rising edge; out_valid/result
// appear after the fifth rising edge (counting the sampling edge).
// Asynchronous active-low reset clears the valid flags.
module fp_mult_pipe5 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  output logic [31:0] result
);
  import dsp_pkg::*;

  localparam int unsigned NPP  = 8;    // partial products of the Booth processor
  localparam int unsigned RW   = 50;   // signed row width

  typedef logic signed [RW-1:0] row_t;
  typedef logic signed [9:0]    exp_t; // exponent with headroom for over/underflow

  // special-case flags carried down the pipeline
  typedef struct packed {
    logic zero;   // a true zero operand (or subnormal) is involved
    logic inf;    // an infinity is involved
    logic nan;    // result is NaN
  } spec_t;

  // ---------------------------------------------------------------- P1
  typedef struct packed {
    logic        valid;
    logic        s1, s2;
    logic [7:0]  e1, e2;
    logic [23:0] m1, m2;
    spec_t       spec;
  } st1_t;

  st1_t p1;
  logic za, zb, ia, ib, na, nb;   // zero / infinity / NaN operand

  assign za = (a[30:23] == 8'h00);
  assign zb = (b[30:23] == 8'h00);
  assign ia = (a[30:23] == 8'hFF) && (a[22:0] == '0);
  assign ib = (b[30:23] == 8'hFF) && (b[22:0] == '0);
  assign na = (a[30:23] == 8'hFF) && (a[22:0] != '0);
  assign nb = (b[30:23] == 8'hFF) && (b[22:0] != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1 <= '0;
    end else begin
      p1.valid     <= in_valid;
      p1.s1        <= a[31];
      p1.s2        <= b[31];
      p1.e1        <= a[30:23];
      p1.e2        <= b[30:23];
      p1.m1        <= {~za, a[22:0]};
      p1.m2        <= {~zb, b[22:0]};
      p1.spec.zero <= za | zb;
      p1.spec.inf  <= ia | ib;
      p1.spec.nan  <= na | nb | ((ia | ib) & (za | zb));
    end
  end

  // ---------------------------------------------------------------- P2
  typedef struct packed {
    logic        valid;
    logic        s;
    exp_t        e_temp;
    logic [23:0] m1;        // kept for the Booth sign correction
    logic        m2_msb;
    spec_t       spec;
  } st2_t;

  st2_t p2;
  row_t pp_c [NPP];
  row_t pp_q [NPP];

  // Booth processor: digits of m2, partial products of m1
  always_comb begin
    row_t        r1, r2, r3, r4, mag;
    logic [24:0] q;          // {m2, 0}
    booth_digit_t d;
    r1 = row_t'({1'b0, p1.m1});
    r2 = r1 <<< 1;
    r4 = r1 <<< 2;
    r3 = r1 + r2;
    q  = {p1.m2, 1'b0};
    for (int k = 0; k < NPP; k++) begin
      d = booth_r8_digit(q[3*k +: 4]);
      unique case (d < 0 ? -d : d)
        4'sd0:   mag = '0;
        4'sd1:   mag = r1;
        4'sd2:   mag = r2;
        4'sd3:   mag = r3;
        default: mag = r4;
      endcase
      pp_c[k] = ((d < 0) ? (~mag + row_t'(1)) : mag) <<< (3 * k);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p2 <= '0;
      for (int k = 0; k < NPP; k++) pp_q[k] <= '0;
    end else begin
      p2.valid  <= p1.valid;
      p2.s      <= p1.s1 ^ p1.s2;
      p2.e_temp <= exp_t'({2'b00, p1.e1}) + exp_t'({2'b00, p1.e2});
      p2.m1     <= p1.m1;
      p2.m2_msb <= p1.m2[23];
      p2.spec   <= p1.spec;
      pp_q      <= pp_c;
    end
  end

  // ---------------------------------------------------------------- P3
  typedef struct packed {
    logic  valid;
    logic  s;
    exp_t  e_temp1;
    spec_t spec;
  } st3_t;

  st3_t p3;
  row_t pp4_q [4];
  row_t corr;

  assign corr = p2.m2_msb ? (row_t'({1'b0, p2.m1}) <<< 24) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p3 <= '0;
      for (int k = 0; k < 4; k++) pp4_q[k] <= '0;
    end else begin
      p3.valid   <= p2.valid;
      p3.s       <= p2.s;
      p3.e_temp1 <= p2.e_temp - exp_t'(127);
      p3.spec    <= p2.spec;
      pp4_q[0]   <= pp_q[0] + pp_q[1];
      pp4_q[1]   <= pp_q[2] + pp_q[3];
      pp4_q[2]   <= pp_q[4] + pp_q[5];
      pp4_q[3]   <= pp_q[6] + pp_q[7] + corr;
    end
  end

  // ---------------------------------------------------------------- P4
  st3_t p4;
  row_t pp2_q [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p4 <= '0;
      pp2_q[0] <= '0;
      pp2_q[1] <= '0;
    end else begin
      p4       <= p3;
      pp2_q[0] <= pp4_q[0] + pp4_q[1];
      pp2_q[1] <= pp4_q[2] + pp4_q[3];
    end
  end

  // ---------------------------------------------------------------- P5
  logic [47:0] prod;
  logic [22:0] frac;
  exp_t        e_norm;
  logic [31:0] res_c;
  row_t        mant_sum;

  always_comb begin
    mant_sum = pp2_q[0] + pp2_q[1];
    prod       = mant_sum[47:0];
    if (prod[47]) begin
      frac   = prod[46:24];
      e_norm = p4.e_temp1 + exp_t'(1);
    end else begin
      frac   = prod[45:23];
      e_norm = p4.e_temp1;
    end
    if (p4.spec.nan)               res_c = 32'h7FC0_0000;
    else if (p4.spec.inf)          res_c = {p4.s, 8'hFF, 23'd0};
    else if (p4.spec.zero)         res_c = {p4.s, 31'd0};
    else if (e_norm >= exp_t'(255)) res_c = {p4.s, 8'hFF, 23'd0};
    else if (e_norm <= exp_t'(0))   res_c = {p4.s, 31'd0};
    else                           res_c = {p4.s, e_norm[7:0], frac};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= p4.valid;
      result    <= res_c;
    end
  end
endmodule : fp_mult_pipe5
