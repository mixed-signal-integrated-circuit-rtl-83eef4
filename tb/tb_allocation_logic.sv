// tb_allocation_logic: applies the eight reachable shift-register states and
// compares the code with the allocation table, written out here row by row,
// and the weighted level of the code (1/6, 1/3, 1/2 per bit, counted in
// sixths) with the level of the approximated raised-cosine edge. The code of
// the eight unreachable states (two transitions in one bit period) is not
// specified; for all sixteen states it checks that the separately computed
// complement rail is the exact complement of the true rail.
module tb_allocation_logic;
  timeunit 1ps; timeprecision 1ps;

  logic       clk = 1'b0;
  logic [3:0] a;
  logic [2:0] b, b_n;
  int         checks = 0, failures = 0;

  always #21 clk = ~clk;

  allocation_logic dut (.a(a), .b(b), .b_n(b_n));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [3:0] a0123;   // a0 a1 a2 a3, left to right
    logic [2:0] b012;    // b0 b1 b2, left to right
    int         sixths;  // level x_approx * 6
  } row_t;

  row_t rows [8] = '{
    '{4'b0000, 3'b000, 0},
    '{4'b1000, 3'b100, 1},
    '{4'b1100, 3'b001, 3},
    '{4'b1110, 3'b011, 5},
    '{4'b1111, 3'b111, 6},
    '{4'b0111, 3'b011, 5},
    '{4'b0011, 3'b001, 3},
    '{4'b0001, 3'b100, 1}
  };

  initial begin
    foreach (rows[i]) begin
      logic [2:0] b_as_b012;
      int         lvl;
      a = {rows[i].a0123[0], rows[i].a0123[1], rows[i].a0123[2], rows[i].a0123[3]};
      @(negedge clk);
      b_as_b012 = {b[0], b[1], b[2]};
      lvl = (b[0] ? 1 : 0) + (b[1] ? 2 : 0) + (b[2] ? 3 : 0);
      checks++;
      if (b_as_b012 !== rows[i].b012) begin
        failures++; $display("a0..a3=%b: b0..b2=%b expected %b", rows[i].a0123, b_as_b012, rows[i].b012);
      end
      checks++;
      if (lvl != rows[i].sixths) begin
        failures++; $display("a0..a3=%b: level %0d/6 expected %0d/6", rows[i].a0123, lvl, rows[i].sixths);
      end
    end
    for (int s = 0; s < 16; s++) begin
      a = 4'(s);
      @(negedge clk);
      checks++;
      if (b_n !== ~b) begin failures++; $display("a=%b: b=%b b_n=%b not complementary", a, b, b_n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
