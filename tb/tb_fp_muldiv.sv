// tb_fp_muldiv: tests the combined multiply/divide unit at binary32 sizes. Random
// operand pairs (mostly near 1.0, some over the whole exponent range, some
// zeros, infinities and NaNs) are applied with the operation chosen at
// random, and result word and flags are compared with the exact
// wide-integer reference model (fp_ref_pkg). Directed cases cover
// overflow, underflow and the invalid operations.
module tb_fp_muldiv;
  import fp_ref_pkg::*;

  logic [31:0] a, b, result;
  logic        div;
  logic        overflow, underflow, invalid;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_inv = 0;

  fp_muldiv #(.EXP_W(8), .MAN_W(23)) dut (
    .a(a), .b(b), .div(div),
    .result(result), .overflow(overflow), .underflow(underflow), .invalid(invalid)
  );

  task automatic check(logic [31:0] x, logic [31:0] y, logic op);
    fp_ref_t r;
    a = x; b = y; div = op;
    #1;
    r = fp_ref(8, 23, 2 + int'(op), 64'(x), 64'(y));
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
    check(32'h42200000, 32'hC0F00000, 0);  // 40 x -7.5 = -300
    if (result !== 32'hC3960000) begin failures++; $display("FAIL 40 x -7.5"); end
    checks++;
    check(32'hC3960000, 32'hC0F00000, 1);  // -300 / -7.5 = 40
    if (result !== 32'h42200000) begin failures++; $display("FAIL -300 / -7.5"); end
    checks++;
    check(32'h7F000000, 32'h40000000, 0);  // 2^127 x 2 overflows
    check(32'h00800000, 32'h3F000000, 0);  // 2^-126 x 0.5 underflows
    check(32'h00800000, 32'h40000000, 1);  // 2^-126 / 2 underflows
    check(32'h3FFFFFFF, 32'h3F800000, 0);  // x 1.0 keeps the operand
    check(32'h00000000, 32'h7F800000, 0);  // 0 x inf
    check(32'h00000000, 32'h00000000, 1);  // 0 / 0
    check(32'h7F800000, 32'hFF800000, 1);  // inf / inf
    check(32'h3F800000, 32'h80000000, 1);  // 1 / -0
    for (int i = 0; i < 8000; i++) check(32'(rand_word(8, 23)), 32'(rand_word(8, 23)), 1'($urandom_range(1)));
    if (n_ovf == 0 || n_unf == 0 || n_inv == 0) begin failures++; $display("FAIL flag never raised"); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
