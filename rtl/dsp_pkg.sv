// dsp_pkg: constants and helper functions shared by the FIR datapath.
//
// * Carry-select group layout.  The 16-bit carry-select adder splits its
//   operands into groups of 2, 2, 3, 4 and 5 bits (bits 1:0, 3:2, 6:4, 10:7
//   and 15:11), the layout printed in the adder's block diagram.  The
//   functions below generalise that rule to any width: group 0 has 2 bits,
//   group k (k >= 1) has k+1 bits, and the last group is clipped to the
//   operand width.  The generalisation beyond 16 bits is this design's own.
// * Radix-8 Booth recoding.  A quartet {b[3k+2], b[3k+1], b[3k], b[3k-1]} of
//   the multiplier (with b[-1] = 0) is recoded to the signed digit
//   -4*q[3] + 2*q[2] + q[1] + q[0], i.e. one of -4 .. +4.  This reproduces the
//   sixteen-row recoding table of the radix-8 algorithm exactly.
package dsp_pkg;

  // Size of carry-select group k (before clipping to the operand width).
  function automatic int unsigned csla_raw_size(int unsigned k);
    return (k == 0) ? 2 : k + 1;
  endfunction

  // Index of the least significant bit of group k.
  function automatic int unsigned csla_group_lo(int unsigned k);
    int unsigned lo = 0;
    for (int unsigned i = 0; i < k; i++) lo += csla_raw_size(i);
    return lo;
  endfunction

  // Number of groups needed to cover `width` bits.
  function automatic int unsigned csla_num_groups(int unsigned width);
    int unsigned n = 0;
    while (csla_group_lo(n) < width) n++;
    return n;
  endfunction

  // Size of group k of a `width`-bit adder, clipped at the top.
  function automatic int unsigned csla_group_size(int unsigned k, int unsigned width);
    int unsigned lo = csla_group_lo(k);
    int unsigned sz = csla_raw_size(k);
    return (lo + sz > width) ? width - lo : sz;
  endfunction

  // Radix-8 Booth digit of a multiplier quartet {b[3k+2], b[3k+1], b[3k], b[3k-1]}.
  typedef logic signed [3:0] booth_digit_t;

  function automatic booth_digit_t booth_r8_digit(logic [3:0] q);
    booth_digit_t d;
    d = -4 * booth_digit_t'({3'b000, q[3]}) + 2 * booth_digit_t'({3'b000, q[2]})
        + booth_digit_t'({3'b000, q[1]}) + booth_digit_t'({3'b000, q[0]});
    return d;
  endfunction

endpackage : dsp_pkg
