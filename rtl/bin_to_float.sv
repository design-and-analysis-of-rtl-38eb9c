// bin_to_float: converts a signed fixed-point binary number to the floating
// point word format, so that plain binary values can be fed to the unit.
//
// The input is a sign, an INT_W-bit integer part and a FRAC_W-bit binary
// fraction (for example 12.375 = 1100.011). The conversion is the usual
// one: place the integer and fraction bits side by side, find the leading 1
// (normalize), take the exponent from its position relative to the binary
// point plus the bias, and keep the MAN_W bits after the leading 1 as the
// mantissa, truncating the rest (round toward zero, as in the arithmetic
// unit). A zero input gives a zero of the given sign. The exponent goes
// through the shared ovf_unf_detect block, so a format too narrow for the
// input range flags overflow or underflow.
//
// Ports: sign, int_part, frac_part in; result word, overflow, underflow out.
// Purely combinational. Converting numbers into the single precision format
// follows the document; the input widths (32-bit integer and 32-bit
// fraction) and the fixed-point input form are this design's choice.
module bin_to_float #(
  parameter int unsigned INT_W  = 32,
  parameter int unsigned FRAC_W = 32,
  parameter int unsigned EXP_W  = 8,
  parameter int unsigned MAN_W  = 23
) (
  input  logic                   sign,
  input  logic [INT_W-1:0]       int_part,
  input  logic [FRAC_W-1:0]      frac_part,
  output logic [EXP_W+MAN_W:0]   result,
  output logic                   overflow,
  output logic                   underflow
);

  localparam int W    = int'(INT_W + FRAC_W);
  localparam int BIAS = (1 << (EXP_W - 1)) - 1;
  localparam int EMAX = (1 << EXP_W) - 1;

  logic [W-1:0]            x;
  logic [W+MAN_W-1:0]      v;
  int                      pos;
  int                      e;
  logic signed [EXP_W+1:0] exp_s;
  logic                    is_zero;

  assign x = {int_part, frac_part};

  always_comb begin
    // Position of the leading one; -1 when the input is zero.
    pos = -1;
    for (int i = 0; i < W; i++) begin
      if (x[i]) pos = i;
    end
    is_zero = (pos < 0);
    // Normalize: shift the leading one to the top of v.
    v = {x, {MAN_W{1'b0}}} << (is_zero ? 0 : W - 1 - pos);
    // True exponent is pos - FRAC_W; clamp so the signed field cannot wrap.
    e = pos - int'(FRAC_W) + BIAS;
    if (e > EMAX) e = EMAX;
    if (e < -1)   e = -1;
    exp_s = (EXP_W+2)'(e);
  end

  logic [EXP_W+MAN_W:0] packed_w;
  logic                 ovf, unf;

  ovf_unf_detect #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_detect (
    .sign     (sign),
    .exp      (exp_s),
    .frac     (v[W+MAN_W-2 -: MAN_W]),
    .result   (packed_w),
    .overflow (ovf),
    .underflow(unf)
  );

  assign result    = is_zero ? {sign, {(EXP_W+MAN_W){1'b0}}} : packed_w;
  assign overflow  = ovf & ~is_zero;
  assign underflow = unf & ~is_zero;

endmodule
