// tb_ovf_unf_detect: tests overflow/underflow detection and packing at the
// binary32 sizes: exponents at and beyond both ends of the normal range
// (-130, -1, 0, 1, 254, 255, 300) and random in-range values, for both signs.
// Overflow must give +-infinity, underflow +-zero, anything else the
// packed word unchanged.
module tb_ovf_unf_detect;
  logic              sign;
  logic signed [9:0] exp;
  logic [22:0]       frac;
  logic [31:0]       result;
  logic              overflow, underflow;
  int checks = 0, failures = 0;

  ovf_unf_detect #(.EXP_W(8), .MAN_W(23)) dut (
    .sign(sign), .exp(exp), .frac(frac),
    .result(result), .overflow(overflow), .underflow(underflow)
  );

  task automatic check(logic s, int e, logic [22:0] f);
    logic [31:0] w;
    logic o, u;
    sign = s; exp = 10'(e); frac = f;
    #1;
    o = (e >= 255);
    u = (e <= 0);
    w = o ? {s, 8'hFF, 23'h0} : u ? {s, 31'h0} : {s, 8'(e), f};
    checks++;
    if (result !== w || overflow !== o || underflow !== u) begin
      failures++;
      if (failures <= 10) $display("FAIL s=%b e=%0d f=%h got %h %b%b", s, e, f, result, overflow, underflow);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      check(1'(s), -130, 23'h123456); check(1'(s), -1, '1); check(1'(s), 0, '1);
      check(1'(s), 1, 0); check(1'(s), 254, '1); check(1'(s), 255, 0); check(1'(s), 300, 23'h5);
    end
    for (int i = 0; i < 2000; i++)
      check(1'($urandom_range(1)), int'($urandom_range(400)) - 100, 23'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
