// tb_thermo_shift_reg: shifts random bits in and compares the state with the
// last four input bits kept in a history (a[0] the newest). A second phase
// holds each bit for four cycles, as the sampler does, and checks that the
// state passes through the thermometer patterns 1000, 1100, 1110, 1111 after
// a rising input and 0111, 0011, 0001, 0000 after a falling one.
module tb_thermo_shift_reg;
  timeunit 1ps; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       din = 1'b0;
  logic [3:0] a;
  logic [3:0] hist = '0;
  int         checks = 0, failures = 0;

  always #21 clk = ~clk;

  thermo_shift_reg dut (.clk(clk), .rst_n(rst_n), .din(din), .a(a));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Patterns written as a0 a1 a2 a3, i.e. reversed against a[3:0].
  logic [3:0] rise_seq [4] = '{4'b1000, 4'b1100, 4'b1110, 4'b1111};
  logic [3:0] fall_seq [4] = '{4'b0111, 4'b0011, 4'b0001, 4'b0000};

  function automatic logic [3:0] as_a0_first(logic [3:0] v);
    return {v[0], v[1], v[2], v[3]};
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (a !== 4'b0) begin failures++; $display("reset value wrong"); end
    rst_n = 1'b1;
    repeat (300) begin
      din = 1'($urandom_range(0, 1));
      hist = {hist[2:0], din};
      @(negedge clk);
      checks++;
      if (a !== hist) begin failures++; $display("a=%b expected %b", a, hist); end
    end
    // bit-held phase: 0 then 1 then 0, four cycles each
    din = 1'b0;
    repeat (4) @(negedge clk);
    din = 1'b1;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      checks++;
      if (as_a0_first(a) !== rise_seq[i]) begin
        failures++; $display("rise step %0d: a0..a3=%b", i, as_a0_first(a));
      end
    end
    din = 1'b0;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      checks++;
      if (as_a0_first(a) !== fall_seq[i]) begin
        failures++; $display("fall step %0d: a0..a3=%b", i, as_a0_first(a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
