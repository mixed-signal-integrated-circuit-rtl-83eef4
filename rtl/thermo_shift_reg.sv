// thermo_shift_reg: the unidirectional shift register of the upsampler.
//
// It has UPSAMPLE (four) flip-flops on the 24 GHz clock. The sampled bit
// enters at a[0] and moves one stage per cycle to a[3]. Since the input bit
// is held for exactly four cycles, the register always spans one bit period
// and holds at most one transition: after a 0->1 change it steps through
// 1000, 1100, 1110, 1111 (a0 first), after a 1->0 change through 0111, 0011,
// 0001, 0000, i.e. a thermometer code of how far the edge has travelled.
//
// Interface: clk (24 GHz), rst_n (asynchronous, active low), din (the
// sampled bit); a is the state, a[0] newest. Timing: one cycle per stage.
//
// The structure is the one of the block diagram; the reset is this design's.
module thermo_shift_reg
  import rcos_pkg::*;
#(
  parameter int unsigned N = UPSAMPLE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         din,
  output logic [N-1:0] a
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a <= '0;
    else        a <= {a[N-2:0], din};
  end

endmodule
