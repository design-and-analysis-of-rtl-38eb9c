// tb_fp_addsub: tests the combined add/subtract unit at binary32 sizes. Random
// operand pairs (mostly near 1.0, some over the whole exponent range, some
// zeros, infinities and NaNs) are applied with the operation chosen at
// random, and result word and flags are compared with the exact
// wide-integer reference model (fp_ref_pkg). Directed cases cover
// overflow, underflow and the invalid operations.
module tb_fp_addsub;
  import fp_ref_pkg::*;

  logic [31:0] a, b, result;
  logic        sub;
  logic        overflow, underflow, invalid;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_inv = 0;

  fp_addsub #(.EXP_W(8), .MAN_W(23)) dut (
    .a(a), .b(b), .sub(sub),
    .result(result), .overflow(overflow), .underflow(underflow), .invalid(invalid)
  );

  task automatic check(logic [31:0] x, logic [31:0] y, logic op);
    fp_ref_t r;
    a = x; b = y; sub = op;
    #1;
    r = fp_ref(8, 23, 0 + int'(op), 64'(x), 64'(y));
    checks++;
    n_ovf += int'(r.overflow); n_unf += int'(r.underflow); n_inv += int'(r.invalid);
    if (result !== r.result[31:0] || overflow !== r.overflow ||
        underflow !== r.underflow || invalid !== r.invalid) begin
      failures++;
      if (failures <= 10)
        $display("FAIL op=%b a=%h b=%h got %h o%b u%b i%b exp %h o%b u%b i%b",
                 op, x, y, result, overflow, underflow, invalid,
                 r.result[31:0], r.overflow, r.underflow, r.invalid);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h41460000, 32'h3EC00000, 0);  // 12.375 + 0.375 = 12.75
    if (result !== 32'h414C0000) begin failures++; $display("FAIL 12.375 + 0.375"); end
    checks++;
    check(32'h3F800000, 32'h33800000, 1);  // 1 - 2^-24 truncates below 1
    if (result !== 32'h3F7FFFFF) begin failures++; $display("FAIL 1 - 2^-24"); end
    checks++;
    check(32'h3F800000, 32'h00800000, 1);  // 1 - tiny (sticky path)
    check(32'h7F7FFFFF, 32'h7F7FFFFF, 0);  // overflow
    check(32'h00800001, 32'h00800000, 1);  // cancellation to underflow
    check(32'h3F800000, 32'h3F800000, 1);  // exact zero
    check(32'h80000000, 32'h00000000, 1);  // -0 - 0 = -0
    check(32'h7F800000, 32'h7F800000, 1);  // inf - inf
    check(32'hFF800000, 32'h3F800000, 0);  // -inf + 1
    for (int i = 0; i < 8000; i++) check(32'(rand_word(8, 23)), 32'(rand_word(8, 23)), 1'($urandom_range(1)));
    if (n_ovf == 0 || n_unf == 0 || n_inv == 0) begin failures++; $display("FAIL flag never raised"); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
