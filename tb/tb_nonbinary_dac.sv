// tb_nonbinary_dac: applies all eight codes and checks both outputs against
// the expected levels. The normalised level is the sum of the bit weights
// 1/6, 1/3 and 1/2; each output then lies between 200 mV and 600 mV around a
// 400 mV common mode (vout_p = 0.2 V + 0.4 V * level, vout_n mirrored). It
// also checks the five levels used by the pulse shaper against the sampled
// raised-cosine values they approximate (largest error about 0.016), and
// that each half follows only its own rail: the positive half the complement
// rail, the negative half the true rail.
module tb_nonbinary_dac;
  timeunit 1ps; timeprecision 1ps;

  logic       clk = 1'b0;
  logic [2:0] b, b_n;
  real        vout_p, vout_n;
  int         checks = 0, failures = 0;

  always #21 clk = ~clk;

  nonbinary_dac dut (.b(b), .b_n(b_n), .vout_p(vout_p), .vout_n(vout_n));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  localparam real PI = 3.14159265358979;

  // codes (b2 b1 b0) of the five shaper levels, and the ideal pulse values
  // x(t) of a roll-off-1 raised cosine at the four sample times of an edge
  logic [2:0] lvl_code  [5] = '{3'b000, 3'b001, 3'b100, 3'b110, 3'b111};
  real        lvl_ideal [5];

  initial begin
    lvl_ideal = '{0.0, 8.0 / (15.0 * PI), 0.5, 8.0 / (3.0 * PI), 1.0};
    for (int c = 0; c < 8; c++) begin
      real lvl, ep, en;
      b   = 3'(c);
      b_n = ~b;
      @(negedge clk);
      lvl = (b[0] ? 1.0 / 6.0 : 0.0) + (b[1] ? 1.0 / 3.0 : 0.0) + (b[2] ? 0.5 : 0.0);
      ep  = 0.2 + 0.4 * lvl;
      en  = 0.6 - 0.4 * lvl;
      checks++;
      if (absr(vout_p - ep) > 1e-9) begin
        failures++; $display("code %b: vout_p %f expected %f", b, vout_p, ep);
      end
      checks++;
      if (absr(vout_n - en) > 1e-9) begin
        failures++; $display("code %b: vout_n %f expected %f", b, vout_n, en);
      end
    end
    for (int i = 0; i < 5; i++) begin
      real lvl;
      b   = lvl_code[i];
      b_n = ~b;
      @(negedge clk);
      lvl = (vout_p - 0.2) / 0.4;
      checks++;
      if (absr(lvl - lvl_ideal[i]) > 0.017) begin
        failures++; $display("level %0d: %f, ideal %f", i, lvl, lvl_ideal[i]);
      end
    end
    // halves driven separately: both rails all zero, so every unit of both
    // halves sees a low input and drives high; no current flows in the load
    b = 3'b000; b_n = 3'b000;
    @(negedge clk);
    checks++;
    if (absr(vout_p - 0.8) > 1e-9 || absr(vout_n - 0.8) > 1e-9) begin
      failures++; $display("separate rails: vout_p %f vout_n %f expected 0.8/0.8", vout_p, vout_n);
    end
    // complement rail all high: every unit of the positive half drives low.
    // True rail b2 b1 b0 = 011: in the negative half only the three units of
    // b2 see a low input and drive high.
    b = 3'b011; b_n = 3'b111;
    @(negedge clk);
    checks++;
    begin
      real vth_n, i;
      vth_n = 0.8 * 3.0 / 6.0;                     // b2's three units drive high
      i     = (0.0 - vth_n) / (2.0 * 50.0 + 100.0);  // positive half at 0 V
      if (absr(vout_p - (0.0 - i * 50.0)) > 1e-9 || absr(vout_n - (vth_n + i * 50.0)) > 1e-9) begin
        failures++; $display("separate rails: vout_p %f vout_n %f", vout_p, vout_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
