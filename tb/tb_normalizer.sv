// tb_normalizer: tests the normalization unit at binary32 sizes. The raw
// significand xx.f (two integer bits, 24 fraction bits) is drawn from each
// of its ranges [2,4), [1,2) and [1/2,1) with exponents near and beyond the
// range limits. The expected word is computed by locating the leading one
// in a plain loop, truncating the bits after it, and applying the
// overflow/underflow rule. Includes the document's worked example
// 10.01011000 x 2^(134-127) -> 1.001011... x 2^(135-127).
module tb_normalizer;
  logic              sign;
  logic signed [9:0] exp;
  logic [25:0]       sig;
  logic [31:0]       result;
  logic              overflow, underflow;
  int checks = 0, failures = 0;
  int n_right = 0, n_none = 0, n_left = 0;

  normalizer #(.EXP_W(8), .MAN_W(23)) dut (
    .sign(sign), .exp(exp), .sig(sig),
    .result(result), .overflow(overflow), .underflow(underflow)
  );

  task automatic check(logic s, int e, logic [25:0] m);
    int p, be;
    logic [22:0] f;
    logic [31:0] w;
    logic o, u;
    sign = s; exp = 10'(e); sig = m;
    #1;
    p = -1;
    for (int i = 0; i < 26; i++) if (m[i]) p = i;
    // value = m * 2^-24 * 2^(e-127); leading one at p means 2^(p-24)
    be = e + p - 24;
    f = 23'(((64'(m) << (63 - p)) & ~(64'd1 << 63)) >> 40);
    o = (be >= 255); u = (be <= 0);
    w = o ? {s, 8'hFF, 23'h0} : u ? {s, 31'h0} : {s, 8'(be), f};
    if (p == 25) n_right++; else if (p == 24) n_none++; else n_left++;
    checks++;
    if (result !== w || overflow !== o || underflow !== u) begin
      failures++;
      if (failures <= 10) $display("FAIL s=%b e=%0d sig=%h got %h %b%b exp %h %b%b",
                                   s, e, m, result, overflow, underflow, w, o, u);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: 10.01011000 with intermediate exponent 10000110.
    check(1'b1, 134, 26'h2580000);
    if (result !== {1'b1, 8'b10000111, 23'b00101100000000000000000}) begin
      failures++; $display("FAIL worked example %h", result);
    end
    checks++;
    check(0, 254, 26'h3000000); check(0, 255, 26'h1000000); check(1, 1, 26'h0800000);
    check(0, 0, 26'h2000000); check(1, 0, 26'h1FFFFFF); check(0, 254, 26'h1000000);
    for (int i = 0; i < 3000; i++) begin
      logic [25:0] m;
      int r;
      r = int'($urandom_range(2));
      m = 26'($urandom);
      m[25:24] = 2'b00;
      if (r == 0) m[25] = 1'b1; else if (r == 1) m[24] = 1'b1; else m[23] = 1'b1;
      check(1'($urandom_range(1)), int'($urandom_range(300)) - 20, m);
    end
    if (n_right == 0 || n_none == 0 || n_left == 0) begin
      failures++; $display("FAIL a normalization case was never exercised");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
