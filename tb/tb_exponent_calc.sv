// tb_exponent_calc: tests the exponent calculator with random and corner
// biased exponents in both forms, Ea + Eb - 127 (multiply) and
// Ea - Eb + 127 (divide), computed here in plain integers. Includes the
// document's worked example 10000100 + 10000001 - 01111111 = 10000110.
module tb_exponent_calc;
  logic [7:0]        ea, eb;
  logic              div;
  logic signed [9:0] e;
  int checks = 0, failures = 0;

  exponent_calc #(.EXP_W(8)) dut (.ea(ea), .eb(eb), .div(div), .e(e));

  task automatic check(int x, int y, logic d);
    int expv;
    ea = 8'(x); eb = 8'(y); div = d;
    #1;
    expv = d ? x - y + 127 : x + y - 127;
    checks++;
    if (int'(e) != expv) begin
      failures++;
      if (failures <= 10) $display("FAIL ea=%0d eb=%0d div=%b e=%0d exp=%0d", x, y, d, e, expv);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(8'b10000100, 8'b10000001, 0);
    if (e !== 10'sb0010000110) begin failures++; $display("FAIL worked example"); end
    checks++;
    check(254, 254, 0); check(1, 1, 0); check(1, 254, 1); check(254, 1, 1);
    check(255, 255, 0); check(0, 255, 1);
    for (int i = 0; i < 2000; i++)
      check(int'($urandom_range(255)), int'($urandom_range(255)), 1'($urandom_range(1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
