// normalizer: normalization unit of the combined multiply/divide unit.
//
// Input is the raw significand of a product or quotient, with two integer
// bits and MAN_W+1 fraction bits (xx.ffff...), already truncated, and the
// signed intermediate exponent. A product of two significands in [1, 2) lies
// in [1, 4); a quotient lies in (1/2, 2). The unit moves the radix point so
// that exactly one 1 stands before it:
//   value in [2, 4):   shift right by one, exponent + 1
//   value in [1, 2):   no shift
//   value in [1/2, 1): shift left by one, exponent - 1
// The hidden bit is then dropped and the fraction truncated to MAN_W bits
// (round toward zero, the rounding of the document's worked example).
// The ovf_unf_detect instance turns the final exponent into +-infinity or
// +-zero with the overflow or underflow flag raised.
//
// Ports: sign, exp (signed EXP_W+2 bits), sig (MAN_W+3 bits) in; result
// word, overflow, underflow out. Combinational. A zero sig (not produced
// by nonzero operands) gives a zero result.
module normalizer #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic                    sign,
  input  logic signed [EXP_W+1:0] exp,
  input  logic        [MAN_W+2:0] sig,
  output logic  [EXP_W+MAN_W:0]   result,
  output logic                    overflow,
  output logic                    underflow
);

  logic signed [EXP_W+1:0] exp_n;
  logic        [MAN_W-1:0] frac;
  logic                    is_zero;
  logic  [EXP_W+MAN_W:0]   packed_w;
  logic                    ovf, unf;

  always_comb begin
    is_zero = 1'b0;
    if (sig[MAN_W+2]) begin
      exp_n = exp + 1;
      frac  = sig[MAN_W+1:2];
    end else if (sig[MAN_W+1]) begin
      exp_n = exp;
      frac  = sig[MAN_W:1];
    end else begin
      exp_n = exp - 1;
      frac  = sig[MAN_W-1:0];
      is_zero = ~sig[MAN_W];
    end
  end

  ovf_unf_detect #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_detect (
    .sign     (sign),
    .exp      (exp_n),
    .frac     (frac),
    .result   (packed_w),
    .overflow (ovf),
    .underflow(unf)
  );

  assign result    = is_zero ? {sign, {(EXP_W+MAN_W){1'b0}}} : packed_w;
  assign overflow  = ovf & ~is_zero;
  assign underflow = unf & ~is_zero;

endmodule
