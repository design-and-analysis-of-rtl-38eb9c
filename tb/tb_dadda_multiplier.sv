// tb_dadda_multiplier: tests the Dadda multiplier at the single precision
// significand width (24 bits: random values, all-ones and hidden-bit
// corners) and, exhaustively, at 5 bits, where every column height case of a
// small tree occurs. Expected products come from the simulator's own
// multiplication of wider integers.
module tb_dadda_multiplier;
  logic [23:0] a, b;
  logic [47:0] p;
  logic [4:0]  sa, sb;
  logic [9:0]  sp;
  int checks = 0, failures = 0;

  dadda_multiplier #(.N(24)) dut (.a(a), .b(b), .p(p));
  dadda_multiplier #(.N(5))  dut5 (.a(sa), .b(sb), .p(sp));

  task automatic check24(logic [23:0] x, logic [23:0] y);
    logic [63:0] expv;
    a = x; b = y;
    #1;
    expv = 64'(x) * 64'(y);
    checks++;
    if (p !== expv[47:0]) begin
      failures++;
      if (failures <= 10) $display("FAIL %h * %h = %h, expected %h", x, y, p, expv[47:0]);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Significands of the worked example 40 x -7.5: 1.01 x 1.111.
    check24(24'hA00000, 24'hF00000);
    if (p !== 48'h960000000000) begin failures++; $display("FAIL worked example"); end
    checks++;
    check24('1, '1); check24(24'h800000, 24'h800000); check24(0, '1); check24(1, 1);
    for (int i = 0; i < 5000; i++) check24(24'($urandom), 24'($urandom));
    for (int i = 0; i < 1024; i++) begin
      {sa, sb} = 10'(i);
      #1;
      checks++;
      if (sp !== 10'(sa) * 10'(sb)) begin
        failures++;
        if (failures <= 10) $display("FAIL N=5 %0d * %0d = %0d", sa, sb, sp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
