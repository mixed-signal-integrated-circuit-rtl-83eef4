// tb_digital_processing_unit: cycle-accurate test of the digital part of the
// pulse shaper, from the input data to the retimed DAC code.
//
// A data-source model plays the role of the external pattern generator: it
// is clocked by the unit's 6 GHz clock output and launches a new random bit
// half a 24 GHz cycle after each rising edge of that clock. The run is done
// twice, once per phase-switch setting, with a reset in between. The
// reference is built only from the data sent, the clock output and the phase
// setting: a sampling edge is a rising (setting 0) or falling (setting 1)
// edge of the clock output, the sampled bit enters a four-entry history one
// cycle later, and the code expected one cycle after that is looked up in the
// allocation table. It also checks the clock output period (4 cycles), the
// two-cycle latency and that every mechanism (both phase settings, rising
// and falling edges, all eight table states) occurred.
module tb_digital_processing_unit;
  timeunit 1ps; timeprecision 1ps;

  localparam int BITS_PER_RUN = 600;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       data_in = 1'b0;
  logic       phase_sel = 1'b0;
  logic       clk_out_6g, sample_clk_6g;
  logic [2:0] code_q, code_n_q;

  int checks = 0, failures = 0;

  always #21 clk = ~clk;

  digital_processing_unit dut (
    .clk(clk), .rst_n(rst_n), .data_in(data_in), .phase_sel(phase_sel),
    .clk_out_6g(clk_out_6g), .sample_clk_6g(sample_clk_6g), .code_q(code_q), .code_n_q(code_n_q)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Allocation table. hist[0] is the newest bit (a0). Returns 0 and sets ok
  // to 0 for a history the shaper cannot hold (two transitions).
  function automatic logic [2:0] table_code(logic [3:0] hist, output logic ok, output int sixths);
    ok = 1'b1;
    case ({hist[0], hist[1], hist[2], hist[3]})   // a0 a1 a2 a3
      4'b0000: begin sixths = 0; return 3'b000; end
      4'b1000: begin sixths = 1; return 3'b001; end  // b0
      4'b1100: begin sixths = 3; return 3'b100; end  // b2
      4'b1110: begin sixths = 5; return 3'b110; end  // b1 b2
      4'b1111: begin sixths = 6; return 3'b111; end
      4'b0111: begin sixths = 5; return 3'b110; end
      4'b0011: begin sixths = 3; return 3'b100; end
      4'b0001: begin sixths = 1; return 3'b001; end
      default: begin ok = 1'b0; sixths = 0; return 3'b000; end
    endcase
  endfunction

  // mechanism counters
  int n_phase_runs [2];
  int n_state [16];
  int n_rise_edges = 0, n_fall_edges = 0, n_samples = 0, n_latency = 0;

  task automatic run(input logic ps);
    logic [3:0] hist;
    logic       ref_d, data_cycle, prev_clk_out, ok, sampled_now;
    logic [2:0] exp_code;
    int         sixths, cyc, last_rise, first_one_sample, launched;
    phase_sel = ps;
    rst_n     = 1'b0;
    data_in   = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    hist = '0; ref_d = 1'b0; data_cycle = 1'b0; prev_clk_out = clk_out_6g;
    cyc = 0; last_rise = -1; first_one_sample = -1; launched = 0;
    while (launched < BITS_PER_RUN) begin
      @(negedge clk);
      cyc++;
      // expected code registered at the edge just past
      exp_code = table_code(hist, ok, sixths);
      checks++;
      if (!ok) begin failures++; $display("reference reached invalid history %b", hist); end
      n_state[{hist[0], hist[1], hist[2], hist[3]}]++;
      if ({hist[0], hist[1], hist[2], hist[3]} == 4'b1000) n_rise_edges++;
      if ({hist[0], hist[1], hist[2], hist[3]} == 4'b0111) n_fall_edges++;
      hist = {hist[2:0], ref_d};
      sampled_now = ps ? (prev_clk_out && !clk_out_6g) : (!prev_clk_out && clk_out_6g);
      if (sampled_now) begin
        ref_d = data_cycle;
        n_samples++;
        if (ref_d && first_one_sample < 0) first_one_sample = cyc;
      end
      // compare
      checks++;
      if (code_q !== exp_code) begin
        failures++;
        $display("phase %0d cycle %0d: code %b expected %b", ps, cyc, code_q, exp_code);
      end
      checks++;
      if (code_n_q !== ~exp_code) begin
        failures++;
        $display("phase %0d cycle %0d: complement rail %b expected %b", ps, cyc, code_n_q, ~exp_code);
      end
      // latency: first nonzero code two cycles after the first sampled one
      if (first_one_sample > 0 && cyc == first_one_sample + 2) begin
        checks++;
        n_latency++;
        if (code_q == 3'b000) begin failures++; $display("latency: code still 000"); end
      end
      if (first_one_sample > 0 && cyc == first_one_sample + 1) begin
        checks++;
        if (code_q != 3'b000) begin failures++; $display("latency: code changed too early"); end
      end
      // clock output period and data source
      if (!prev_clk_out && clk_out_6g) begin
        if (last_rise >= 0) begin
          checks++;
          if (cyc - last_rise != 4) begin failures++; $display("clock output period %0d", cyc - last_rise); end
        end
        last_rise = cyc;
        // keep the first bits at zero so the latency check sees a clean edge
        data_in = (launched < 3) ? 1'b0 : (launched == 3) ? 1'b1 : 1'($urandom_range(0, 1));
        launched++;
      end
      data_cycle   = data_in;
      prev_clk_out = clk_out_6g;
    end
    n_phase_runs[ps]++;
  endtask

  initial begin
    n_phase_runs = '{0, 0};
    foreach (n_state[i]) n_state[i] = 0;
    run(1'b0);
    run(1'b1);
    $display("phase runs %0d/%0d, rising %0d, falling %0d, samples %0d, latency checks %0d",
             n_phase_runs[0], n_phase_runs[1], n_rise_edges, n_fall_edges, n_samples, n_latency);
    checks++;
    if (n_phase_runs[0] == 0 || n_phase_runs[1] == 0) begin failures++; $display("a phase setting was not run"); end
    checks++;
    if (n_rise_edges == 0 || n_fall_edges == 0) begin failures++; $display("no rising or no falling edge"); end
    checks++;
    if (n_latency != 2) begin failures++; $display("latency checked %0d times", n_latency); end
    foreach (n_state[s]) begin
      logic [3:0] v;
      v = 4'(s);
      if (v == 4'b0000 || v == 4'b1000 || v == 4'b1100 || v == 4'b1110 ||
          v == 4'b1111 || v == 4'b0111 || v == 4'b0011 || v == 4'b0001) begin
        checks++;
        if (n_state[s] == 0) begin failures++; $display("state a0..a3=%b never reached", v); end
      end
    end
    // one sample per four cycles: 2 * BITS_PER_RUN bits, minus the last one of each run
    checks++;
    if (n_samples < 2 * BITS_PER_RUN - 4 || n_samples > 2 * BITS_PER_RUN) begin
      failures++; $display("samples %0d for %0d bits", n_samples, 2 * BITS_PER_RUN);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
