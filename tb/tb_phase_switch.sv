// tb_phase_switch: walks the divider state {div4_q, div2_q} through all four
// values for both switch settings. For each state the expected outputs are
// derived from the next divider state: the switched clock is div4 (inverted
// when phase_sel = 1), and sample_en must be high exactly when the switched
// clock is low now and high after the next 24 GHz edge. It also checks that
// each setting gives one enable per four cycles and that the two settings
// sample two cycles apart.
module tb_phase_switch;
  timeunit 1ps; timeprecision 1ps;

  logic clk = 1'b0;
  logic div2_q, div4_q, phase_sel, sclk, sample_en;
  int   checks = 0, failures = 0;

  always #21 clk = ~clk;

  phase_switch dut (.div2_q(div2_q), .div4_q(div4_q), .phase_sel(phase_sel),
                    .sclk(sclk), .sample_en(sample_en));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int en_state [2];
  initial begin
    for (int ps = 0; ps < 2; ps++) begin
      int n_en;
      n_en = 0;
      for (int st = 0; st < 4; st++) begin
        logic clk_now, clk_next;
        int   nxt;
        nxt      = (st + 1) % 4;
        clk_now  = ((st  >> 1) & 1) ^ ps;
        clk_next = ((nxt >> 1) & 1) ^ ps;
        {div4_q, div2_q} = 2'(st);
        phase_sel = 1'(ps);
        @(negedge clk);
        checks++;
        if (sclk !== clk_now) begin
          failures++; $display("ps=%0d st=%0d sclk=%b exp %b", ps, st, sclk, clk_now);
        end
        checks++;
        if (sample_en !== (!clk_now && clk_next)) begin
          failures++; $display("ps=%0d st=%0d sample_en=%b exp %b", ps, st, sample_en, !clk_now && clk_next);
        end
        if (sample_en) begin n_en++; en_state[ps] = st; end
      end
      checks++;
      if (n_en != 1) begin failures++; $display("ps=%0d: %0d enables per bit", ps, n_en); end
    end
    checks++;
    if ((en_state[1] - en_state[0] + 4) % 4 != 2) begin
      failures++; $display("phases %0d and %0d are not half a bit apart", en_state[0], en_state[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
