// tb_prbs9_spectrum: runs a PRBS-9 stream (generator polynomial x^9 + x^5 + 1,
// period 511 bits) through the whole pulse shaper at 6 Gbit/s in, 24 GS/s out,
// and checks the two properties expected of the shaped output.
//
// Eye: every output sample lies on one of the five levels 200, 267, 400, 533
// and 600 mV (0, 1/6, 1/2, 5/6, 1 of the swing), consecutive samples are on the
// same or neighbouring levels, and all five levels occur.
//
// Spectrum: over exactly one sequence period (511 * 4 = 2044 samples) it takes
// the discrete Fourier transform of the DAC output and of the unshaped input
// stream sampled at the same rate, and compares the mean power in the first
// side lobe (7 to 11 GHz) relative to the main lobe (0.2 to 2 GHz). The
// shaping must lower the side lobe by at least 20 dB; the staircase
// approximation gives about 25 dB for this sequence.
module tb_prbs9_spectrum;
  timeunit 1ps; timeprecision 1ps;

  localparam int    NBITS   = 511;
  localparam int    NS      = NBITS * 4;
  localparam real   FS_GHZ  = 24.0;
  localparam real   PI      = 3.14159265358979;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       data_in = 1'b0;
  logic       clk_out_6g, sample_clk_6g;
  logic [2:0] code_q, code_n_q;
  real        vout_p, vout_n;
  logic [8:0] lfsr = 9'h1ff;

  int checks = 0, failures = 0;

  always #21 clk = ~clk;

  rcos_pulse_shaper_top dut (
    .clk_24g(clk), .rst_n(rst_n), .data_in(data_in), .phase_sel(1'b0),
    .clk_out_6g(clk_out_6g), .sample_clk_6g(sample_clk_6g), .code_q(code_q), .code_n_q(code_n_q),
    .vout_p(vout_p), .vout_n(vout_n)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pattern generator clocked by the chip's clock output
  logic prev_clk_out = 1'b0;
  always @(negedge clk) begin
    if (rst_n && !prev_clk_out && clk_out_6g) begin
      data_in <= lfsr[8];
      lfsr    <= {lfsr[7:0], lfsr[8] ^ lfsr[4]};
    end
    prev_clk_out <= clk_out_6g;
  end

  real shaped [NS];
  real nrz    [NS];
  real cos_t  [NS];
  real sin_t  [NS];

  function automatic real band_power(ref real x [NS], input real f1, input real f2);
    real mean, acc;
    int  nb;
    mean = 0.0;
    for (int n = 0; n < NS; n++) mean += x[n];
    mean /= NS;
    acc = 0.0; nb = 0;
    for (int k = 1; k < NS / 2; k++) begin
      real f;
      f = FS_GHZ * k / NS;
      if (f >= f1 && f <= f2) begin
        real re, im;
        re = 0.0; im = 0.0;
        for (int n = 0; n < NS; n++) begin
          re += (x[n] - mean) * cos_t[(k * n) % NS];
          im -= (x[n] - mean) * sin_t[(k * n) % NS];
        end
        acc += re * re + im * im;
        nb++;
      end
    end
    return acc / nb;
  endfunction

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    real levels [5];
    int  level_hits [5];
    int  prev_lvl, bad_level, bad_step;
    real pm_nrz, ps_nrz, pm_sh, ps_sh, supp_db;
    levels = '{0.2, 0.2 + 0.4 / 6.0, 0.4, 0.2 + 0.4 * 5.0 / 6.0, 0.6};
    level_hits = '{0, 0, 0, 0, 0};
    for (int n = 0; n < NS; n++) begin
      cos_t[n] = $cos(2.0 * PI * n / NS);
      sin_t[n] = $sin(2.0 * PI * n / NS);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // let one full sequence period pass so the output is periodic
    repeat (NS + 16) @(negedge clk);
    prev_lvl = -1; bad_level = 0; bad_step = 0;
    for (int n = 0; n < NS; n++) begin
      int lvl;
      @(negedge clk);
      shaped[n] = vout_p;
      nrz[n]    = data_in ? 1.0 : 0.0;
      lvl = -1;
      for (int i = 0; i < 5; i++) if (absr(vout_p - levels[i]) < 1e-6) lvl = i;
      if (lvl < 0) bad_level++;
      else begin
        level_hits[lvl]++;
        if (prev_lvl >= 0 && (lvl - prev_lvl > 1 || prev_lvl - lvl > 1)) bad_step++;
      end
      prev_lvl = lvl;
    end
    checks++;
    if (bad_level != 0) begin failures++; $display("%0d samples off the five levels", bad_level); end
    checks++;
    if (bad_step != 0) begin failures++; $display("%0d jumps between non-neighbouring levels", bad_step); end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (level_hits[i] == 0) begin failures++; $display("level %0d never used", i); end
    end
    $display("level use: %0d %0d %0d %0d %0d", level_hits[0], level_hits[1], level_hits[2],
             level_hits[3], level_hits[4]);
    pm_nrz = band_power(nrz, 0.2, 2.0);
    ps_nrz = band_power(nrz, 7.0, 11.0);
    pm_sh  = band_power(shaped, 0.2, 2.0);
    ps_sh  = band_power(shaped, 7.0, 11.0);
    supp_db = 10.0 * $log10((ps_nrz / pm_nrz) / (ps_sh / pm_sh));
    $display("side lobe (7-11 GHz) suppression relative to unshaped input: %f dB", supp_db);
    checks++;
    if (supp_db < 20.0) begin failures++; $display("suppression below 20 dB"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
