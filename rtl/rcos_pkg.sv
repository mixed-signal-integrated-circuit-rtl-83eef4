// rcos_pkg: constants and types shared by the raised-cosine pulse shaper.
//
// The shaper upsamples a binary stream by four and approximates a raised-
// cosine pulse (roll-off 1) with five output levels 0, 1/6, 1/2, 5/6 and 1.
// The levels are produced by a 3-bit code b0..b2 whose bits carry the
// non-binary weights 1/6, 1/3 and 1/2. In the DAC every weight is made of
// unit driver stages (one 6R stage per sixth), so the weights are kept here
// as integer counts of unit stages: b0 = 1, b1 = 2, b2 = 3, six in total.
package rcos_pkg;

  // Upsampling factor: output symbols per input bit (24 GS/s from 6 Gbit/s).
  localparam int unsigned UPSAMPLE = 4;

  // Number of code bits driving the DAC.
  localparam int unsigned CODE_W = 3;

  // Unit driver stages behind each code bit, and their sum.
  localparam int unsigned UNITS_B0 = 1;
  localparam int unsigned UNITS_B1 = 2;
  localparam int unsigned UNITS_B2 = 3;
  localparam int unsigned UNITS_TOTAL = UNITS_B0 + UNITS_B1 + UNITS_B2;

  // Shift-register state: a[0] is the newest sample, a[3] the oldest.
  typedef logic [UPSAMPLE-1:0] sr_state_t;

  // DAC code: code[0] = b0 (weight 1/6), code[1] = b1 (1/3), code[2] = b2 (1/2).
  typedef logic [CODE_W-1:0] dac_code_t;

  // Number of unit stages a code switches on (0..6); the normalised output
  // level is this count divided by UNITS_TOTAL.
  function automatic int unsigned code_units(dac_code_t c);
    return (c[0] ? UNITS_B0 : 0) + (c[1] ? UNITS_B1 : 0) + (c[2] ? UNITS_B2 : 0);
  endfunction

endpackage
