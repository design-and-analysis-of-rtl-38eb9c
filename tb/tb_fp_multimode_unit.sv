// tb_fp_multimode_unit: end-to-end test of the multimode floating point unit
// at its default (binary32) parameters.
//
// Applies directed and random operand pairs in all four modes, changing the
// mode between vectors, and compares result word and flags with the exact
// wide-integer reference model (fp_ref_pkg). It also counts how often each
// mechanism of the design was exercised and fails if one never was: every
// mode, mode switches, overflow, underflow, invalid operations, the
// operand-class bypass (zero/inf/NaN operands), divide by zero, the
// normalizer's right shift (product >= 2) and left shift (quotient < 1), and
// the adder's carry-out and cancellation renormalization. The unit is
// combinational; each vector is checked 1 ns after it is applied, and a
// time watchdog ends a hung run.
module tb_fp_multimode_unit;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  localparam int EW = 8;
  localparam int MW = 23;

  logic [31:0] a, b, result;
  fp_op_e      mode;
  logic        overflow, underflow, invalid;

  logic        cvt_sign;
  logic [31:0] cvt_int, cvt_frac, cvt_result;
  logic        cvt_overflow, cvt_underflow;

  fp_multimode_unit dut (
    .a(a), .b(b), .mode(mode),
    .result(result), .overflow(overflow), .underflow(underflow), .invalid(invalid),
    .cvt_sign(cvt_sign), .cvt_int(cvt_int), .cvt_frac(cvt_frac),
    .cvt_result(cvt_result), .cvt_overflow(cvt_overflow), .cvt_underflow(cvt_underflow)
  );

  int checks = 0;
  int failures = 0;
  int n_mode[4];
  int n_switch = 0, n_ovf = 0, n_unf = 0, n_inv = 0, n_bypass = 0, n_divzero = 0;
  int n_cvt = 0;
  int n_mul_shr = 0, n_div_shl = 0, n_add_carry = 0, n_cancel = 0;
  fp_op_e last_mode = OP_ADD;

  function automatic logic is_special(logic [31:0] w);
    return (w[30:23] == 8'h00) || (w[30:23] == 8'hFF);
  endfunction

  task automatic apply(logic [31:0] ta, logic [31:0] tb_, fp_op_e m);
    fp_ref_t r;
    int emx;
    a = ta; b = tb_; mode = m;
    #1;
    r = fp_ref(EW, MW, int'(m), 64'(ta), 64'(tb_));
    checks++;
    if (result !== r.result[31:0] || overflow !== r.overflow ||
        underflow !== r.underflow || invalid !== r.invalid) begin
      failures++;
      if (failures <= 10)
        $display("FAIL mode=%0d a=%h b=%h got %h o%b u%b i%b exp %h o%b u%b i%b",
                 m, ta, tb_, result, overflow, underflow, invalid,
                 r.result[31:0], r.overflow, r.underflow, r.invalid);
    end
    // Mechanism coverage.
    n_mode[int'(m)]++;
    if (m != last_mode) n_switch++;
    last_mode = m;
    if (overflow)  n_ovf++;
    if (underflow) n_unf++;
    if (invalid)   n_inv++;
    if (is_special(ta) || is_special(tb_)) begin
      n_bypass++;
      if (m == OP_DIV && tb_[30:23] == 0 && ta[30:23] != 0 && ta[30:23] != 8'hFF) n_divzero++;
    end else if (!overflow && !underflow && result[30:0] != 0) begin
      emx = (ta[30:23] > tb_[30:23]) ? int'(ta[30:23]) : int'(tb_[30:23]);
      if (m == OP_MUL && 48'({1'b1, ta[22:0]}) * 48'({1'b1, tb_[22:0]}) >= (48'd1 << 47)) n_mul_shr++;
      if (m == OP_DIV && {1'b1, ta[22:0]} < {1'b1, tb_[22:0]}) n_div_shl++;
      if ((m == OP_ADD || m == OP_SUB) && int'(result[30:23]) > emx) n_add_carry++;
      if ((m == OP_ADD || m == OP_SUB) && int'(result[30:23]) < emx) n_cancel++;
    end
  endtask

  // Convert a fixed-point number, then use the converted word as operand a.
  task automatic convert_then_apply(logic s, logic [31:0] ip, logic [31:0] fp,
                                    logic [31:0] tb_, fp_op_e m);
    fp_ref_t r;
    cvt_sign = s; cvt_int = ip; cvt_frac = fp;
    #1;
    if ({ip, fp} == 0) r.result = 64'(s) << 31;
    else r = pack(EW, MW, s, wide_t'({ip, fp}), -32);
    checks++;
    if (cvt_result !== r.result[31:0] || cvt_overflow || cvt_underflow) begin
      failures++;
      if (failures <= 10) $display("FAIL convert %b %h.%h got %h exp %h", s, ip, fp, cvt_result, r.result[31:0]);
    end
    n_cvt++;
    apply(cvt_result, tb_, m);
  endtask

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("  %-28s %0d", what, count);
    end
  endtask

  initial begin
    // Watchdog: the whole run takes well under this simulated time.
    #1ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cvt_sign = 1'b0; cvt_int = '0; cvt_frac = '0;
    // Directed: 40 x -7.5 = -300, 12.375 + 0.375, 1.0 - 1.0, 1.5 / 0.5.
    apply(32'h42200000, 32'hC0F00000, OP_MUL);
    if (result !== 32'hC3960000) begin failures++; $display("FAIL 40 x -7.5"); end
    checks++;
    apply(32'h41460000, 32'h3EC00000, OP_ADD);
    if (result !== 32'h414C0000) begin failures++; $display("FAIL 12.375 + 0.375"); end
    checks++;
    apply(32'h3F800000, 32'h3F800000, OP_SUB);
    if (result !== 32'h00000000) begin failures++; $display("FAIL 1 - 1"); end
    checks++;
    apply(32'h3FC00000, 32'h3F000000, OP_DIV);
    if (result !== 32'h40400000) begin failures++; $display("FAIL 1.5 / 0.5"); end
    checks++;
    apply(32'h7F000000, 32'h7F000000, OP_MUL);  // overflow
    apply(32'h00800000, 32'h00800000, OP_MUL);  // underflow
    apply(32'h7F800000, 32'h00000000, OP_MUL);  // inf x 0
    apply(32'h3F800000, 32'h00000000, OP_DIV);  // 1 / 0
    apply(32'h7F7FFFFF, 32'h7F7FFFFF, OP_ADD);  // add overflow
    apply(32'h00800001, 32'h00800000, OP_SUB);  // cancellation to underflow
    // Binary inputs converted first: 12.375 x -7.5 = -92.8125.
    convert_then_apply(1'b0, 32'd12, 32'h6000_0000, 32'hC0F00000, OP_MUL);
    checks++;
    if (cvt_result !== 32'h41460000 || result !== 32'hC2B9A000) begin
      failures++; $display("FAIL 12.375 converted, times -7.5");
    end
    for (int i = 0; i < 2000; i++)
      convert_then_apply(1'($urandom_range(1)), 32'($urandom) >> $urandom_range(31), 32'($urandom),
                         32'(rand_word(EW, MW)), fp_op_e'($urandom_range(3)));
    // Random vectors in random modes.
    for (int i = 0; i < 20000; i++)
      apply(32'(rand_word(EW, MW)), 32'(rand_word(EW, MW)), fp_op_e'($urandom_range(3)));

    need("binary-to-float conversion",   n_cvt);
    need("add",                          n_mode[0]);
    need("subtract",                     n_mode[1]);
    need("multiply",                     n_mode[2]);
    need("divide",                       n_mode[3]);
    need("mode switch",                  n_switch);
    need("overflow",                     n_ovf);
    need("underflow",                    n_unf);
    need("invalid",                      n_inv);
    need("operand-class bypass",         n_bypass);
    need("divide by zero",               n_divzero);
    need("normalize right (product>=2)", n_mul_shr);
    need("normalize left (quotient<1)",  n_div_shl);
    need("add carry-out",                n_add_carry);
    need("cancellation shift",           n_cancel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
