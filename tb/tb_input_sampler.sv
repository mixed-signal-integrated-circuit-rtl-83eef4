// tb_input_sampler: drives random data and a random enable and checks that
// the flip-flop loads the data only on edges where the enable was high and
// holds its value otherwise.
module tb_input_sampler;
  timeunit 1ps; timeprecision 1ps;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sample_en = 1'b0, data_in = 1'b0, d_q;
  logic model = 1'b0;
  int   checks = 0, failures = 0, loads = 0, holds = 0;

  always #21 clk = ~clk;

  input_sampler dut (.clk(clk), .rst_n(rst_n), .sample_en(sample_en),
                     .data_in(data_in), .d_q(d_q));

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
    if (d_q !== 1'b0) begin failures++; $display("reset value wrong"); end
    rst_n = 1'b1;
    repeat (400) begin
      sample_en = 1'($urandom_range(0, 1));
      data_in   = 1'($urandom_range(0, 1));
      if (sample_en) begin model = data_in; loads++; end
      else if (data_in != model) holds++;
      @(negedge clk);
      checks++;
      if (d_q !== model) begin failures++; $display("d_q=%b expected %b", d_q, model); end
    end
    checks++;
    if (loads == 0 || holds == 0) begin failures++; $display("loads %0d holds %0d", loads, holds); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
