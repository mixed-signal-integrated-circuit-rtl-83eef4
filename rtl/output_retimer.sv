// output_retimer: three differential flip-flops on the 24 GHz clock that
// resample the code b0..b2 (true and complement rail) before it reaches the
// DAC.
//
// Retiming removes the unequal delays of the allocation logic so that all
// three DAC inputs switch on the same clock edge, which keeps glitches out of
// the analog output.
//
// Interface: clk (24 GHz), rst_n (asynchronous, active low), b_in / bn_in
// (true and complement rail from the allocation logic), b_q / bn_q (to the
// DAC). Timing: one cycle of latency. Reset gives code 000 on the true rail
// and 111 on the complement rail.
//
// The flip-flops are the document's; the reset is this design's.
module output_retimer
  import rcos_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  dac_code_t b_in,
  input  dac_code_t bn_in,
  output dac_code_t b_q,
  output dac_code_t bn_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_q  <= '0;
      bn_q <= '1;
    end else begin
      b_q  <= b_in;
      bn_q <= bn_in;
    end
  end

endmodule
