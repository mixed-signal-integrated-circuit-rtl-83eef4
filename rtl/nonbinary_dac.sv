// nonbinary_dac: behavioural model (not synthesizable logic) of the
// differential voltage-mode DAC with non-binary weighting.
//
// Each half of the differential output is a set of CMOS inverter drivers with
// series resistors joined at one output node: b0 drives one unit stage (6R),
// b1 two in parallel (3R) and b2 three (2R), six unit stages in all, so the
// weights are 1/6, 1/3 and 1/2 and the source resistance of a half is
// 6R/6 = R = 50 ohm (the inverter's own resistance is part of each 6R). A
// half therefore behaves as a 50 ohm source whose open-circuit voltage is VDD
// times the fraction of unit stages driving high. The positive half is driven
// by the complement rail b_n, so through the inverting drivers a set code bit
// raises vout_p; the negative half is driven by the true rail b and mirrors
// it. With a
// 100 ohm differential load the output node of each half sees 50 ohm to the
// common mode VDD/2, and at VDD = 0.8 V each output swings from 200 mV (code
// 000) to 600 mV (code 111), 400 mV peak-to-peak around 400 mV.
//
// Interface: b (true rail, b[0] = b0), b_n (complement rail), vout_p and
// vout_n in volts. Timing: the output follows the code with no delay; the
// bandwidth limit of the real output is not modelled.
//
// Weights, resistor ratios, R = 50 ohm, VDD = 0.8 V and the 200 mV to 600 mV
// swing are the document's; the resistive Thevenin model and the assignment
// of the true and complement rails to the halves are this model's.
module nonbinary_dac
  import rcos_pkg::*;
#(
  parameter real VDD_V           = 0.8,
  parameter real R_OHM           = 50.0,
  parameter real R_LOAD_DIFF_OHM = 100.0
) (
  input  dac_code_t b,
  input  dac_code_t b_n,
  output real       vout_p,
  output real       vout_n
);

  real vth_p;    // open-circuit voltage of the positive half
  real vth_n;    // open-circuit voltage of the negative half
  real i_load;   // current through the differential load

  // A unit stage drives high when its inverter input is low, so each half's
  // open-circuit voltage is VDD times the share of its units with a low input.
  always_comb begin
    vth_p  = VDD_V * real'(code_units(~b_n)) / real'(UNITS_TOTAL);
    vth_n  = VDD_V * real'(code_units(~b))   / real'(UNITS_TOTAL);
    i_load = (vth_p - vth_n) / (2.0 * R_OHM + R_LOAD_DIFF_OHM);
    vout_p = vth_p - i_load * R_OHM;
    vout_n = vth_n + i_load * R_OHM;
  end

endmodule
