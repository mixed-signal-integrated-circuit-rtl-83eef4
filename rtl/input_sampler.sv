// input_sampler: the first sampling flip-flop, which captures the external
// 6 Gbit/s data once per bit period.
//
// The flip-flop is clocked by the 24 GHz clock and loads data_in only when
// sample_en from the phase switch is high, which is equivalent to clocking it
// with the phase-switched 6 GHz clock. Its output is held for four 24 GHz
// cycles and feeds the first stage of the shift register.
//
// Interface: clk (24 GHz), rst_n (asynchronous, active low), sample_en,
// data_in; d_q is the sampled bit. Timing: d_q changes right after a clk edge
// at which sample_en was high.
//
// Sampling at 6 GHz is from the document; the clock-enable form and the reset
// are this design's choices.
module input_sampler (
  input  logic clk,
  input  logic rst_n,
  input  logic sample_en,
  input  logic data_in,
  output logic d_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         d_q <= 1'b0;
    else if (sample_en) d_q <= data_in;
  end

endmodule
