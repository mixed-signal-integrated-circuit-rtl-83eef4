// digital_processing_unit: the synthesizable part of the pulse shaper, from
// the 24 GHz clock and the external data to the retimed 3-bit DAC code.
//
// The 24 GHz clock is divided by four (clk_div4) into the 6 GHz bit clock,
// which is brought out (clk_out_6g) to clock the external data source. The
// phase switch picks the true or inverted bit clock for the input flip-flop
// (input_sampler), which captures one bit per four 24 GHz cycles. The bit runs
// through the four-stage shift register (thermo_shift_reg); the register state
// tells where in the bit period the last data edge lies, and the allocation
// logic turns it into the non-binary code b0..b2 (weights 1/6, 1/3, 1/2).
// The code is dual-rail: true and complement rail each have their own logic,
// as in the differential circuit. Three differential retiming flip-flops
// (output_retimer) align the code bits.
//
// Interface: clk (24 GHz), rst_n (asynchronous, active low), data_in,
// phase_sel (0: sample on the rising edge of the bit clock, 1: on its falling
// edge), clk_out_6g, sample_clk_6g (the phase-switched bit clock, for
// observation), code_q (true rail of the code, b0 in bit 0), code_n_q (its
// complement rail, computed by its own logic as in the differential circuit). phase_sel is a static setting: change
// it only during reset, since moving the sampling instant earlier while
// running can sample one bit twice within one shift-register window; an
// assertion checks that the register never holds two transitions.
// Timing: code_q reflects a sampled bit two 24 GHz cycles after the sampling
// edge (one shift stage plus retiming); an edge then takes four cycles to
// pass through the levels 1/6, 1/2, 5/6 and 1 (or back down).
//
// The chain of blocks is the document's. Running every flip-flop on the one
// 24 GHz clock with a sampling enable, the reset and the two-phase switch are
// this design's choices; input receivers and clock buffers are wires here.
module digital_processing_unit
  import rcos_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      data_in,
  input  logic      phase_sel,
  output logic      clk_out_6g,
  output logic      sample_clk_6g,
  output dac_code_t code_q,
  output dac_code_t code_n_q
);

  logic      div2_q;
  logic      div4_q;
  logic      sclk;
  logic      sample_en;
  logic      d_q;
  sr_state_t a;
  dac_code_t b;
  dac_code_t b_n;

  clk_div4 u_div (
    .clk    (clk),
    .rst_n  (rst_n),
    .div2_q (div2_q),
    .div4_q (div4_q)
  );

  assign clk_out_6g    = div4_q;
  assign sample_clk_6g = sclk;

  phase_switch u_phase (
    .div2_q    (div2_q),
    .div4_q    (div4_q),
    .phase_sel (phase_sel),
    .sclk      (sclk),
    .sample_en (sample_en)
  );

  input_sampler u_in (
    .clk       (clk),
    .rst_n     (rst_n),
    .sample_en (sample_en),
    .data_in   (data_in),
    .d_q       (d_q)
  );

  thermo_shift_reg #(.N(UPSAMPLE)) u_sr (
    .clk   (clk),
    .rst_n (rst_n),
    .din   (d_q),
    .a     (a)
  );

  allocation_logic u_alloc (
    .a   (a),
    .b   (b),
    .b_n (b_n)
  );

  output_retimer u_ret (
    .clk   (clk),
    .rst_n (rst_n),
    .b_in  (b),
    .bn_in (b_n),
    .b_q   (code_q),
    .bn_q  (code_n_q)
  );

  // The shift register spans exactly one bit period, so while phase_sel is
  // held it never contains more than one transition (Table of allocation_logic).
  a_one_transition: assert property (
    @(posedge clk) disable iff (!rst_n)
      (2'(a[0] ^ a[1]) + 2'(a[1] ^ a[2]) + 2'(a[2] ^ a[3])) <= 2'd1
  );

  // The two rails of the differential code must always be complementary.
  a_rails_complementary: assert property (
    @(posedge clk) disable iff (!rst_n) code_n_q == ~code_q
  );

endmodule
