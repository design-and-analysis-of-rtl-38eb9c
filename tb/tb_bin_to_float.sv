// tb_bin_to_float: tests the fixed-point to floating point converter at its
// defaults (32-bit integer part, 32-bit fraction, binary32 output). Directed
// values: 12.375 (1100.011 -> 0x41460000), 0.375 (0.011 -> 0x3EC00000),
// 1.0, zero, the largest and smallest inputs and the 32-bit approximation of
// 0.1, which is not exact in binary. Random inputs of every magnitude are
// checked against the exact wide-integer reference model (fp_ref_pkg).
module tb_bin_to_float;
  import fp_ref_pkg::*;

  logic        sign;
  logic [31:0] int_part, frac_part;
  logic [31:0] result;
  logic        overflow, underflow;
  int checks = 0, failures = 0;

  bin_to_float dut (
    .sign(sign), .int_part(int_part), .frac_part(frac_part),
    .result(result), .overflow(overflow), .underflow(underflow)
  );

  task automatic check(logic s, logic [31:0] ip, logic [31:0] fp);
    fp_ref_t r;
    sign = s; int_part = ip; frac_part = fp;
    #1;
    if ({ip, fp} == 0) begin
      r.result = 64'(s) << 31; r.overflow = 0; r.underflow = 0;
    end else begin
      r = pack(8, 23, s, wide_t'({ip, fp}), -32);
    end
    checks++;
    if (result !== r.result[31:0] || overflow !== r.overflow || underflow !== r.underflow) begin
      failures++;
      if (failures <= 10) $display("FAIL %b %h.%h got %h exp %h", s, ip, fp, result, r.result[31:0]);
    end
  endtask

  task automatic expect_word(logic [31:0] w, string what);
    checks++;
    if (result !== w) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, result, w);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 32'd12, 32'h6000_0000); expect_word(32'h41460000, "12.375");
    check(0, 32'd0,  32'h6000_0000); expect_word(32'h3EC00000, "0.375");
    check(1, 32'd1,  32'h0);         expect_word(32'hBF800000, "-1.0");
    check(0, 32'd0,  32'h0);         expect_word(32'h00000000, "0");
    check(0, 32'd0,  32'h1999_9999); expect_word(32'h3DCCCCCC, "0.1 truncated");
    check(0, '1, '1);
    check(0, 32'd0, 32'd1);
    for (int i = 0; i < 3000; i++) begin
      logic [63:0] x;
      x = {$urandom, $urandom} >> $urandom_range(63);
      check(1'($urandom_range(1)), x[63:32], x[31:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
