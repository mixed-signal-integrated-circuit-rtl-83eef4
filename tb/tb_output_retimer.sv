// tb_output_retimer: drives random values on both rails and checks that each
// appears at the output, bit for bit, exactly one 24 GHz cycle later, and that
// reset gives 000 on the true and 111 on the complement rail.
module tb_output_retimer;
  timeunit 1ps; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [2:0] b_in = '0, bn_in = '1, b_q, bn_q;
  int         checks = 0, failures = 0;

  always #21 clk = ~clk;

  output_retimer dut (.clk(clk), .rst_n(rst_n), .b_in(b_in), .bn_in(bn_in),
                      .b_q(b_q), .bn_q(bn_q));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (b_q !== 3'b0 || bn_q !== 3'b111) begin failures++; $display("reset value wrong"); end
    rst_n = 1'b1;
    repeat (300) begin
      b_in  = 3'($urandom_range(0, 7));
      bn_in = 3'($urandom_range(0, 7));
      @(negedge clk);
      checks++;
      if (b_q !== b_in) begin failures++; $display("b_q=%b expected %b", b_q, b_in); end
      checks++;
      if (bn_q !== bn_in) begin failures++; $display("bn_q=%b expected %b", bn_q, bn_in); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
