// tb_sign_calc: exhaustive test of the sign calculator (result sign is the
// XOR of the operand signs) over all four input combinations, with a time
// watchdog.
module tb_sign_calc;
  logic sa, sb, s;
  int checks = 0, failures = 0;

  sign_calc dut (.sa(sa), .sb(sb), .s(s));

  initial begin
    #1us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {sa, sb} = 2'(i);
      #1;
      checks++;
      // negative x positive (or the reverse) is negative
      if (s !== (i == 1 || i == 2)) begin
        failures++;
        $display("FAIL sa=%b sb=%b s=%b", sa, sb, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
