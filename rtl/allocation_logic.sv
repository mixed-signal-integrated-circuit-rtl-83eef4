// allocation_logic: maps the shift-register state a0..a3 onto the 3-bit code
// b0..b2 of the non-binary DAC.
//
// Each of the eight states the register can hold (no transition, or one
// transition at one of four positions) selects one of the five output levels
// of the approximated raised-cosine edge:
//
//   a0 a1 a2 a3 | b0 b1 b2 | level
//   0  0  0  0  | 0  0  0  | 0
//   1  0  0  0  | 1  0  0  | 1/6
//   1  1  0  0  | 0  0  1  | 1/2
//   1  1  1  0  | 0  1  1  | 5/6
//   1  1  1  1  | 1  1  1  | 1
//   0  1  1  1  | 0  1  1  | 5/6
//   0  0  1  1  | 0  0  1  | 1/2
//   0  0  0  1  | 1  0  0  | 1/6
//
// with weights 1/6, 1/3 and 1/2 for b0, b1 and b2. The sum-of-products form is
//   b0 = a0 & ~a1 | a0 & a3 | ~a2 & a3
//   b1 = a1 & a2
//   b2 = a0 & a1 | a2 & a3
// The circuit is differential: in differential cascode voltage switch logic
// every gate has a second pull-down network that computes the complement, so
// both rails come from their own sum-of-products rather than from an
// inverter. The complement rail b_n is written the same way here:
//   b0_n = ~a0 & a2 | ~a0 & ~a3 | a1 & ~a3
//   b1_n = ~a1 | ~a2
//   b2_n = ~a0 & ~a2 | ~a0 & ~a3 | ~a1 & ~a2 | ~a1 & ~a3
// States with more than one transition cannot occur while the input is held
// for four cycles.
//
// Interface: a (a[0] = a0), b (b[0] = b0), b_n (complement rail).
// Timing: combinational.
// The table, the true-rail equations and the differential logic style are the
// document's; the complement equations are derived from them here, and the
// dummy gates the silicon adds for symmetry (no logic effect) are left out.
module allocation_logic
  import rcos_pkg::*;
(
  input  sr_state_t a,
  output dac_code_t b,
  output dac_code_t b_n
);

  always_comb begin
    b[0] = (a[0] & ~a[1]) | (a[0] & a[3]) | (~a[2] & a[3]);
    b[1] = a[1] & a[2];
    b[2] = (a[0] & a[1]) | (a[2] & a[3]);

    b_n[0] = (~a[0] & a[2]) | (~a[0] & ~a[3]) | (a[1] & ~a[3]);
    b_n[1] = ~a[1] | ~a[2];
    b_n[2] = (~a[0] & ~a[2]) | (~a[0] & ~a[3]) | (~a[1] & ~a[2]) | (~a[1] & ~a[3]);
  end

endmodule
