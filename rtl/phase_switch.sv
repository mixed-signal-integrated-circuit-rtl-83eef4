// phase_switch: chooses the phase of the 6 GHz clock that drives the input
// sampling flip-flop, which sets the setup time left for the incoming data.
//
// The switch passes the divided clock either as is or inverted (phase_sel = 1),
// which moves the sampling instant by half a bit period (two 24 GHz cycles).
// Because this design keeps every flip-flop on the 24 GHz clock, the switched
// clock is also turned into a one-cycle enable: sample_en is high in the
// 24 GHz cycle at whose closing edge the switched clock rises. With the
// counter of clk_div4 that is the cycle with div2_q = 1 and div4_q = phase_sel.
//
// Interface: div2_q, div4_q from clk_div4; phase_sel (static control);
// sclk (the switched 6 GHz clock, for observation); sample_en (one cycle in
// four). Timing: purely combinational.
//
// The block and its purpose are those of the block diagram; the choice of two
// phases (true and inverted) and the control input are this design's own.
module phase_switch (
  input  logic div2_q,
  input  logic div4_q,
  input  logic phase_sel,
  output logic sclk,
  output logic sample_en
);

  always_comb begin
    sclk      = div4_q ^ phase_sel;
    // The switched clock rises at the next edge when div4_q toggles (div2_q
    // high) while the switched clock is still low.
    sample_en = div2_q & ~sclk;
  end

endmodule
