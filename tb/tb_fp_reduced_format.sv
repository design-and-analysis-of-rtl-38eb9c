// tb_fp_reduced_format: the multimode unit built for a reduced format with
// the binary32 exponent (8 bits, bias 127) but only 4 stored mantissa bits,
// hidden bit kept. It replays the worked multiplication example of that
// format: A = 0 10000100 0100 (40) times B = 1 10000001 1110 (-7.5) has the
// significand product 10.01011000, exponent 10000110 before and 10000111
// after normalization, and truncates to 1 10000111 0010 (-288). It then
// applies random operand pairs in all four modes against the exact
// reference model at the same format.
module tb_fp_reduced_format;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  localparam int EW = 8;
  localparam int MW = 4;

  logic [EW+MW:0] a, b, result;
  fp_op_e         mode;
  logic           overflow, underflow, invalid;
  int checks = 0, failures = 0;
  logic [EW+MW:0] cvt_result;
  logic           cvt_overflow, cvt_underflow;

  fp_multimode_unit #(.EXP_W(EW), .MAN_W(MW)) dut (
    .a(a), .b(b), .mode(mode),
    .result(result), .overflow(overflow), .underflow(underflow), .invalid(invalid),
    .cvt_sign(1'b0), .cvt_int(32'd40), .cvt_frac(32'd0),
    .cvt_result(cvt_result), .cvt_overflow(cvt_overflow), .cvt_underflow(cvt_underflow)
  );

  task automatic check(logic [EW+MW:0] x, logic [EW+MW:0] y, fp_op_e m);
    fp_ref_t r;
    a = x; b = y; mode = m;
    #1;
    r = fp_ref(EW, MW, int'(m), 64'(x), 64'(y));
    checks++;
    if (result !== r.result[EW+MW:0] || overflow !== r.overflow ||
        underflow !== r.underflow || invalid !== r.invalid) begin
      failures++;
      if (failures <= 10) $display("FAIL mode=%0d a=%b b=%b got %b exp %b", m, x, y, result, r.result[EW+MW:0]);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    checks++;  // 40 in the reduced format is the example's operand A
    if (cvt_result !== 13'b0_10000100_0100 || cvt_overflow || cvt_underflow) begin
      failures++;
      $display("FAIL converting 40: got %b", cvt_result);
    end
    check(13'b0_10000100_0100, 13'b1_10000001_1110, OP_MUL);
    checks++;
    if (result !== 13'b1_10000111_0010) begin
      failures++;
      $display("FAIL worked example: got %b", result);
    end else begin
      $display("40 x -7.5 in the 4-bit-mantissa format = %b (-288)", result);
    end
    for (int i = 0; i < 4000; i++)
      check(13'(rand_word(EW, MW)), 13'(rand_word(EW, MW)), fp_op_e'($urandom_range(3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
