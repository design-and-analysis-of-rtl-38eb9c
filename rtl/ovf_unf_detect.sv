// ovf_unf_detect: overflow/underflow detection and result packing.
//
// Takes the sign, the signed biased exponent after normalization and the
// truncated fraction, and decides from the exponent alone:
//   exponent >= 2^EXP_W - 1  overflow:  result is +-infinity, overflow = 1
//   exponent <= 0            underflow: result is +-zero,     underflow = 1
//   otherwise                the normal word {sign, exponent, fraction}.
// An intermediate exponent of exactly 0 that normalization raised to 1 is
// therefore not an underflow, as in the document's description. Results
// that would be subnormal are flushed to a zero of the correct sign.
//
// Ports: sign, exp (signed, EXP_W+2 bits), frac (MAN_W bits) in;
//        result word, overflow and underflow flags out. Combinational.
module ovf_unf_detect #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic                    sign,
  input  logic signed [EXP_W+1:0] exp,
  input  logic        [MAN_W-1:0] frac,
  output logic  [EXP_W+MAN_W:0]   result,
  output logic                    overflow,
  output logic                    underflow
);

  localparam logic signed [EXP_W+1:0] EXP_MAX = (EXP_W+2)'((1 << EXP_W) - 1);

  always_comb begin
    overflow  = 1'b0;
    underflow = 1'b0;
    if (exp >= EXP_MAX) begin
      overflow = 1'b1;
      result   = {sign, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    end else if (exp <= 0) begin
      underflow = 1'b1;
      result    = {sign, {EXP_W{1'b0}}, {MAN_W{1'b0}}};
    end else begin
      result = {sign, exp[EXP_W-1:0], frac};
    end
  end

endmodule
