// booth_mult_r8: N x N two's-complement multiplier using radix-8 Booth
// recoding (default N = 8, the multiplier width of the filter).
//
// How it works.  The multiplier `b`, sign-extended and with a 0 appended
// below its LSB, is cut into overlapping quartets, one per 3 bits.  Each
// quartet is recoded to a signed digit d_k in -4 .. +4 (dsp_pkg), so only
// ceil(N/3) partial products are needed instead of N.  Partial product k is
// d_k * a, chosen by a multiplexer from 0, a, 2a, 3a and 4a and negated
// (two's complement) for negative digits; 2a and 4a are shifts, and the
// "hard multiple" 3a = a + 2a is formed once by an adder and shared by all
// digits.  Each partial product is sign-extended and weighted by 8^k (a left
// shift by 3k), and the rows are summed into the 2N-bit product.
//
// Interface and timing.  Purely combinational: p = a * b, exact, as a 2N-bit
// signed number.  The filter registers the product, so the multiply has the
// two-cycle sample period of the filter to settle.
//
// The recoding table, the hard multiple 3a, the 3-bit offset between rows
// and the sign extension follow the radix-8 scheme of the published design;
// the final summation is written as a plain sum of the rows (the synthesis
// tool builds the adder tree), which is this design's own simplification.
module booth_mult_r8 #(
  parameter int unsigned N = 8
) (
  input  logic signed [N-1:0]   a,   // multiplicand
  input  logic signed [N-1:0]   b,   // multiplier (Booth-recoded)
  output logic signed [2*N-1:0] p
);
  import dsp_pkg::*;

  localparam int unsigned ND = (N + 2) / 3;     // number of digits / partial products
  localparam int unsigned PW = 2 * N;           // partial-product width
  localparam int unsigned BW = 3 * ND + 1;      // extended multiplier width

  typedef logic signed [PW-1:0] row_t;

  logic [BW-1:0]  b_ext;      // {sign extension, b, 0}
  row_t           m1, m2, m3, m4;
  booth_digit_t   dig [ND];
  row_t           pp  [ND];

  assign b_ext = {{(BW - N - 1){b[N-1]}}, b, 1'b0};

  // Multiples of the multiplicand, sign-extended to the product width.
  assign m1 = row_t'(a);
  assign m2 = m1 <<< 1;
  assign m4 = m1 <<< 2;
  assign m3 = m1 + m2;        // hard multiple

  always_comb begin
    p = '0;
    for (int k = 0; k < ND; k++) begin
      row_t mag;
      dig[k] = booth_r8_digit(b_ext[3*k +: 4]);
      unique case (dig[k] < 0 ? -dig[k] : dig[k])
        4'sd0:   mag = '0;
        4'sd1:   mag = m1;
        4'sd2:   mag = m2;
        4'sd3:   mag = m3;
        default: mag = m4;
      endcase
      pp[k] = (dig[k] < 0) ? (~mag + row_t'(1)) : mag;
      p     = p + (pp[k] <<< (3 * k));
    end
  end
endmodule : booth_mult_r8
