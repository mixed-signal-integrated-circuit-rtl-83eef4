// rcos_pulse_shaper_top: direct raised-cosine waveform synthesis of a binary
// stream, 6 Gbit/s in, 24 GS/s five-level analog output.
//
// The digital processing unit upsamples the input bit by four and turns the
// position of each data edge within the bit period into a 3-bit non-binary
// code; the DAC (nonbinary_dac, a behavioural model of the analog output
// stage) weights the code bits 1/6, 1/3 and 1/2. Each data edge therefore
// becomes a staircase through 0, 1/6, 1/2, 5/6 and 1 of the output swing, one
// step per 24 GHz cycle, an approximation of a raised-cosine pulse with
// roll-off 1 truncated to one bit period on either side of its centre.
//
// Interface: clk_24g, rst_n (asynchronous, active low), data_in (external
// bit, to be launched from clk_out_6g), phase_sel (0: sample on the rising
// edge of the bit clock, 1: on its falling edge), clk_out_6g, sample_clk_6g
// (the phase-switched bit clock of the input flip-flop), code_q / code_n_q
// (true and complement rail of the retimed DAC code b0..b2), vout_p / vout_n (DAC outputs in volts, 200 mV to 600 mV).
// Timing: the DAC output reflects a sampled bit two 24 GHz cycles after the
// sampling edge.
//
// The structure follows the document; the split into a digital unit and the
// DAC model, the single clock domain and the reset are this design's.
module rcos_pulse_shaper_top
  import rcos_pkg::*;
(
  input  logic      clk_24g,
  input  logic      rst_n,
  input  logic      data_in,
  input  logic      phase_sel,
  output logic      clk_out_6g,
  output logic      sample_clk_6g,
  output dac_code_t code_q,
  output dac_code_t code_n_q,
  output real       vout_p,
  output real       vout_n
);

  digital_processing_unit u_dpu (
    .clk           (clk_24g),
    .rst_n         (rst_n),
    .data_in       (data_in),
    .phase_sel     (phase_sel),
    .clk_out_6g    (clk_out_6g),
    .sample_clk_6g (sample_clk_6g),
    .code_q        (code_q),
    .code_n_q      (code_n_q)
  );

  nonbinary_dac u_dac (
    .b      (code_q),
    .b_n    (code_n_q),
    .vout_p (vout_p),
    .vout_n (vout_n)
  );

endmodule
