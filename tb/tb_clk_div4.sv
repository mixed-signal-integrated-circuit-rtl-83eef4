// tb_clk_div4: checks the two divide-by-two stages against a cycle counter.
// After reset the pair {div4_q, div2_q} must count 0,1,2,3,... one step per
// 24 GHz edge, so div2_q has a period of 2 cycles and div4_q (the 6 GHz bit
// clock) a period of 4 cycles with two cycles high and two low.
module tb_clk_div4;
  timeunit 1ps; timeprecision 1ps;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic div2_q, div4_q;
  int   checks = 0, failures = 0;
  int   edges = 0;
  int   rises = 0, last_rise = -1;

  always #21 clk = ~clk;

  clk_div4 dut (.clk(clk), .rst_n(rst_n), .div2_q(div2_q), .div4_q(div4_q));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic prev_div4;
  initial begin
    repeat (3) @(negedge clk);
    checks++;
    if (div2_q !== 1'b0 || div4_q !== 1'b0) begin
      failures++; $display("reset value wrong: %b%b", div4_q, div2_q);
    end
    rst_n = 1'b1;
    prev_div4 = div4_q;
    repeat (200) begin
      @(negedge clk);
      edges++;
      checks++;
      if ({div4_q, div2_q} !== 2'(edges % 4)) begin
        failures++;
        $display("edge %0d: got %b%b expected %0d", edges, div4_q, div2_q, edges % 4);
      end
      if (div4_q && !prev_div4) begin
        if (last_rise >= 0) begin
          checks++;
          if (edges - last_rise != 4) begin
            failures++; $display("6 GHz period %0d cycles, expected 4", edges - last_rise);
          end
        end
        last_rise = edges;
        rises++;
      end
      prev_div4 = div4_q;
    end
    checks++;
    if (rises != 50) begin failures++; $display("rises %0d expected 50", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
