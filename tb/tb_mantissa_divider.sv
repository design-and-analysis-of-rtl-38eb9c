// tb_mantissa_divider: tests the significand divider, q = floor(x * 2^N / y)
// for normalized x and y, at N = 24 (random and corner significands) and
// exhaustively at N = 4. Expected quotients come from integer division in
// the simulator.
module tb_mantissa_divider;
  logic [23:0] x, y;
  logic [24:0] q;
  logic [3:0]  sx, sy;
  logic [4:0]  sq;
  int checks = 0, failures = 0;

  mantissa_divider #(.N(24)) dut (.x(x), .y(y), .q(q));
  mantissa_divider #(.N(4))  dut4 (.x(sx), .y(sy), .q(sq));

  task automatic check24(logic [23:0] tx, logic [23:0] ty);
    logic [63:0] expv;
    x = tx; y = ty;
    #1;
    expv = (64'(tx) << 24) / 64'(ty);
    checks++;
    if (q !== expv[24:0]) begin
      failures++;
      if (failures <= 10) $display("FAIL %h / %h = %h, expected %h", tx, ty, q, expv[24:0]);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check24(24'hC00000, 24'h800000);  // 1.5 / 1.0
    if (q !== 25'h1800000) begin failures++; $display("FAIL 1.5/1.0"); end
    checks++;
    check24(24'h800000, 24'hFFFFFF); check24(24'hFFFFFF, 24'h800000); check24(24'hABCDEF, 24'hABCDEF);
    for (int i = 0; i < 5000; i++) check24(24'($urandom) | 24'h800000, 24'($urandom) | 24'h800000);
    for (int i = 8; i < 16; i++)
      for (int j = 8; j < 16; j++) begin
        sx = 4'(i); sy = 4'(j);
        #1;
        checks++;
        if (int'(sq) != (i * 16) / j) begin
          failures++;
          $display("FAIL N=4 %0d / %0d = %0d", i, j, sq);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
