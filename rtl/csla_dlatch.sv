// csla_dlatch: carry-select adder whose upper groups share one ripple-carry
// adder between the two carry hypotheses by means of a D-latch.
//
// Operation.  The operands are split into groups (2, 2, 3, 4 and 5 bits for
// the default 16-bit width, see dsp_pkg).  Group 0 is a plain ripple-carry
// adder fed by `cin`.  Every other group has a single ripple-carry adder
// whose carry input is the phase signal `en`, plus a D-latch that is
// transparent while `en` = 1:
//   en = 1  the adder forms the group sum for carry-in 1 and the latch
//           follows it;
//   en = 0  the latch holds that carry-in-1 result while the same adder now
//           forms the carry-in-0 result.
// During en = 0 a multiplexer per group picks the latched (carry 1) or the
// live (carry 0) result, selected by the carry out of the group below, and
// that carry ripples through the multiplexer chain only, as in any
// carry-select adder.
//
// Timing.  `a`, `b` and `cin` must be stable through one en = 1 phase and
// the following en = 0 phase; `sum`/`cout` are valid at the end of the
// en = 0 phase and are meaningless while en = 1.  Inside the filter `en` is
// a registered phase bit that toggles every clock, so one addition takes two
// clock cycles and no clock is used as data.
//
// The latches are intended: they are the storage element this adder is built
// around, so the latch inferred for each group's `held` value is expected.
// The group layout, the single adder per group and the latch follow the
// published structure; driving the shared adder's carry input from the
// enable is this design's reading of how one adder yields both results.
module csla_dlatch #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             en,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  import dsp_pkg::*;

  localparam int unsigned NG = csla_num_groups(WIDTH);

  logic [NG:0] c;   // c[g]: carry into group g
  assign c[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int unsigned LO = csla_group_lo(g);
    localparam int unsigned SZ = csla_group_size(g, WIDTH);

    if (g == 0) begin : g_first
      rca #(.N(SZ)) u_rca (
        .a   (a[LO +: SZ]),
        .b   (b[LO +: SZ]),
        .cin (c[0]),
        .sum (sum[LO +: SZ]),
        .cout(c[1])
      );
    end else begin : g_sel
      logic [SZ-1:0] s_rca;
      logic          co_rca;
      logic [SZ:0]   held;     // {carry, sum} for carry-in 1

      rca #(.N(SZ)) u_rca (
        .a   (a[LO +: SZ]),
        .b   (b[LO +: SZ]),
        .cin (en),
        .sum (s_rca),
        .cout(co_rca)
      );

      always_latch begin
        if (en) held = {co_rca, s_rca};
      end

      assign {c[g+1], sum[LO +: SZ]} = c[g] ? held : {co_rca, s_rca};
    end
  end

  assign cout = c[NG];
endmodule : csla_dlatch
