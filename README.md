# Raised-cosine pulse shaper: 6 Gbit/s in, 24 GS/s five-level out

This design shapes a binary data stream so that its edges follow a
raised-cosine pulse with roll-off 1, without an FIR filter, a lookup table or a
high-resolution DAC. The only input is a 1-bit stream at 6 Gbit/s. Each bit is
upsampled four times. A four-stage shift register then records where in the
bit period the last data edge lies. Small combinational logic turns that
position into a 3-bit code. A DAC with **non-binary** bit weights (1/6, 1/3, 1/2)
converts the code to one of five levels. Every rising edge of the data becomes
the staircase 0 → 1/6 → 1/2 → 5/6 → 1, one step per 24 GHz cycle, and every
falling edge becomes the same staircase downwards. These five values are close
to samples of the ideal pulse, whose largest error is about 0.016 of the swing.
For a PRBS-9 stream this lowers the first spectral side lobe by about 25 dB
compared with the unshaped stream.

The digital part is synthesizable SystemVerilog. The DAC is analog, so it is a
behavioural model with real-valued outputs.

## How an edge becomes a staircase

The bit clock is the 24 GHz clock divided by four. The input flip-flop takes
one sample per bit and holds it for four 24 GHz cycles. The sample enters the
shift register at `a0` and moves one stage per cycle to `a3`. The register
therefore covers exactly one bit period, so it holds at most one transition.
Its state is a thermometer code of how far the last edge has travelled:

| a0 a1 a2 a3 | b0 b1 b2 | level (fraction of swing) | ideal raised-cosine sample |
|-------------|----------|---------------------------|----------------------------|
| 0 0 0 0     | 0 0 0    | 0                         | 0                          |
| 1 0 0 0     | 1 0 0    | 1/6 ≈ 0.167               | 8/(15π) ≈ 0.170            |
| 1 1 0 0     | 0 0 1    | 1/2                       | 1/2                        |
| 1 1 1 0     | 0 1 1    | 5/6 ≈ 0.833               | 8/(3π) ≈ 0.849             |
| 1 1 1 1     | 1 1 1    | 1                         | 1                          |
| 0 1 1 1     | 0 1 1    | 5/6                       |                            |
| 0 0 1 1     | 0 0 1    | 1/2                       |                            |
| 0 0 0 1     | 1 0 0    | 1/6                       |                            |

The bit weights are b0 = 1/6, b1 = 1/3 and b2 = 1/2. The three code bits are
written in sum-of-products form as:

    b0 = a0·!a1 + a0·a3 + !a2·a3
    b1 = a1·a2
    b2 = a0·a1 + a2·a3

Why this works: a raised-cosine pulse with roll-off 1 is cut off beyond one
bit period on each side of its centre. At four samples per bit, an isolated
`1` then occupies 8 output samples: 1/6, 1/2, 5/6, 1, 5/6, 1/2, 1/6, 0. Two
neighbouring pulses overlap by half a bit, and the sum of their tails is
always 1. So a long run of ones stays at the top level, and the output depends
only on where the last edge is. That is exactly what the shift register holds.
The eight states with two transitions cannot occur while the input is held for
four cycles. An assertion in `digital_processing_unit` checks this.

### Dual-rail code

The output path is differential, so the code exists on two rails. In
differential cascode voltage switch logic, each gate has a second pull-down
network that computes the complement directly, without an inverter. For that
reason the complement rail `b_n` has its own sum-of-products, derived from
the equations above by De Morgan:

    b0_n = !a0·a2 + !a0·!a3 + a1·!a3
    b1_n = !a1 + !a2
    b2_n = !a0·!a2 + !a0·!a3 + !a1·!a2 + !a1·!a3

These are exact complements for all sixteen states. The retiming flip-flops
carry both rails. An assertion checks that the two rails always disagree.

## The non-binary DAC

Each half of the differential output is made of six identical unit drivers.
A unit driver is a CMOS inverter in series with a 6R = 300 Ω resistor. All six
outputs are joined at one node:

- b0 drives one unit (6R, weight 1/6)
- b1 drives two units in parallel (3R, weight 1/3)
- b2 drives three units in parallel (2R, weight 1/2)

The six units in parallel have a source resistance of R = 50 Ω, which matches
the 50 Ω line (100 Ω differential). Seen from outside, each half is a 50 Ω
source. Its open-circuit voltage is VDD times the fraction of units that drive
high.

With VDD = 0.8 V and a 100 Ω differential load, each output moves between
200 mV and 600 mV around a 400 mV common mode. The positive half is driven
by the complement rail `b_n` and the negative half by the true rail `b`.
Because the drivers invert, a set code bit then raises `vout_p`. The model
gives `vout_p = 0.2 V + 0.4 V · level` and mirrors it on `vout_n`.

A binary DAC would need about 6 bits to place these five levels as accurately.
Here 3 bits and six identical unit cells are enough.

The model leaves out the inverter non-linearity, the output bandwidth, the
delay and the back-gate bias of the drivers.

## Clocking and timing

- `clk_div4`: two divide-by-two stages. They are written as a 2-bit counter
  `{div4_q, div2_q}`. `div4_q` is the 6 GHz bit clock. It is brought out as
  `clk_out_6g` and meant to clock the external data source.
- `phase_switch`: chooses whether the input flip-flop samples on the rising
  edge of the bit clock (`phase_sel = 0`) or its falling edge (`phase_sel = 1`).
  This moves the sampling instant by half a bit period, which adjusts the
  setup time left for data launched from `clk_out_6g`. Treat `phase_sel` as a
  static setting and change it only during reset.
- All flip-flops run on the one 24 GHz clock. The 6 GHz sampling is a
  one-cycle clock enable (`sample_en`), not a second clock domain.
- Latency: the code, and so the DAC output, shows a sampled bit two 24 GHz
  cycles after its sampling edge. One cycle is the first shift stage and one
  is the retiming flip-flops. After that the staircase takes four cycles.
- Reset: `rst_n` is asynchronous and active low, and it clears every
  flip-flop. It exists so that the divider phase and the register contents are
  defined at start-up.

## Module hierarchy

```
rcos_pulse_shaper_top          top: digital unit + DAC model
├── digital_processing_unit    synthesizable core, data in → 3-bit code out
│   ├── clk_div4               24 GHz → 6 GHz (two /2 stages)
│   ├── phase_switch           true or inverted bit clock → sample enable
│   ├── input_sampler          first sampling flip-flop
│   ├── thermo_shift_reg       four-stage shift register a0..a3 (parameter N = 4)
│   ├── allocation_logic       a0..a3 → b0..b2 and complement rail (equations above)
│   └── output_retimer         three differential flip-flops in front of the DAC
└── nonbinary_dac              behavioural model, real-valued outputs
rcos_pkg                       upsampling factor, code types, unit-stage weights
```

Ports of `rcos_pulse_shaper_top`:

| port            | dir | width | meaning |
|-----------------|-----|-------|---------|
| `clk_24g`       | in  | 1     | 24 GHz symbol clock |
| `rst_n`         | in  | 1     | asynchronous reset, active low |
| `data_in`       | in  | 1     | data bit, launched from `clk_out_6g` |
| `phase_sel`     | in  | 1     | 0: sample at the rising edge of the bit clock, 1: at the falling edge |
| `clk_out_6g`    | out | 1     | 6 GHz bit clock for the data source |
| `sample_clk_6g` | out | 1     | phase-switched bit clock of the input flip-flop (observation) |
| `code_q`        | out | 3     | retimed code, true rail, bit 0 = b0 |
| `code_n_q`      | out | 3     | complement rail of the retimed code |
| `vout_p`, `vout_n` | out | real | DAC outputs in volts |

After synthesis, the digital unit is 13 flip-flops and a few dozen
word-level cells.

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each one has a watchdog that stops it. For
example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rcos_pkg.sv \
    tb/tb_rcos_pulse_shaper_top.sv --top-module tb_rcos_pulse_shaper_top
./obj_dir/Vtb_rcos_pulse_shaper_top
```

To run another testbench, replace the file and the top-module name. Each
testbench runs in well under a second.

| testbench | what it checks |
|-----------|----------------|
| `tb_clk_div4` | counter sequence after reset; 4-cycle period of the bit clock |
| `tb_phase_switch` | both settings over all divider states; one enable per bit; the two settings are half a bit apart |
| `tb_input_sampler` | loads only when enabled and holds otherwise |
| `tb_thermo_shift_reg` | random shifting against a history; the thermometer sequences for a rising and a falling edge |
| `tb_allocation_logic` | every reachable state against the allocation table and its level in sixths; for all 16 states, that the complement rail is exact |
| `tb_output_retimer` | one-cycle latency, bit for bit, on both rails; the reset values |
| `tb_nonbinary_dac` | all eight codes against the 200–600 mV levels; the five levels against the ideal pulse samples; each half follows only its own rail |
| `tb_digital_processing_unit` | random data with both phase settings against a reference built from the data and the clock output (both rails); latency; coverage of all eight states |
| `tb_rcos_pulse_shaper_top` | the same end to end, including both DAC outputs every cycle (default parameters) |
| `tb_prbs9_spectrum` | PRBS-9 (x⁹ + x⁵ + 1): only the five levels appear, steps go only to a neighbouring level, and the 7–11 GHz side lobe is lowered by at least 20 dB against the unshaped stream (it measures 25.7 dB) |

## Where this RTL departs from the silicon it describes

- The chip is fully differential. Here only the DAC code is dual-rail: each
  rail has its own logic, as in the differential cascode voltage switch logic
  of the chip. Clock, data and shift register are single-rail. The transistor
  networks of that logic style, and the dummy gates the chip adds for
  symmetry, are not modelled.
- The chip clocks the input flip-flop from the divided clock. Here that
  flip-flop uses a clock enable on the 24 GHz clock. The two are equivalent
  cycle by cycle, but not in analog timing, so setup and hold margins are not
  modelled.
- The chip has no reset on its divider. The reset here is an addition.
- The phase switch is specified only by its purpose. A two-position switch
  (true or inverted bit clock) is this design's choice.
- The input terminations, the inverters, the clock buffers and the supply
  decoupling are plain wires or are absent.
- The DAC is an ideal resistive model. The bandwidth limit that smooths the
  real staircase is not modelled. The reachable clock rate and the power
  (about 30 mW at 24 GS/s) cannot be judged from RTL.
