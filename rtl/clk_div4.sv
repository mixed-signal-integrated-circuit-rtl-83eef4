// clk_div4: two cascaded divide-by-two stages that derive the 6 GHz bit clock
// from the 24 GHz symbol clock.
//
// Both stages are modelled as toggle flip-flops on the 24 GHz clock. The first
// (div2_q) toggles every cycle; the second (div4_q) toggles whenever the first
// is high, i.e. on the falling transition of the first stage, as a ripple
// divider whose second stage is clocked by the inverted first-stage output
// would. Together they form a 2-bit counter {div4_q, div2_q}; div4_q is the
// 6 GHz clock that is brought out of the chip and that the phase switch uses
// for the input sampling flip-flop.
//
// Interface: clk (24 GHz), rst_n (asynchronous, active low), div2_q (12 GHz),
// div4_q (6 GHz, 50 % duty cycle, period 4 clk cycles).
// Timing: both outputs are flip-flop outputs and change right after clk rises.
//
// The two /2 stages come from the block diagram. The silicon divider has no
// initialisation circuit (the authors name one as future work); the reset
// here is this design's addition so that the start phase is defined.
module clk_div4 (
  input  logic clk,
  input  logic rst_n,
  output logic div2_q,
  output logic div4_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div2_q <= 1'b0;
      div4_q <= 1'b0;
    end else begin
      div2_q <= ~div2_q;
      if (div2_q) div4_q <= ~div4_q;
    end
  end

endmodule
