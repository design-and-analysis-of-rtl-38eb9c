// fp_muldiv: combined floating point multiply/divide unit.
//
// One unit serves both operations so that the sign calculator, the exponent
// calculator and the normalization unit are shared; only the significand
// core differs (a Dadda multiplier for products, a restoring array divider
// for quotients). Multiplication follows the steps: XOR the signs, add the
// biased exponents and subtract the bias once, multiply the significands
// 1.Ma x 1.Mb, normalize so that a single 1 precedes the radix point,
// truncate the fraction, then check for overflow and underflow. Division
// mirrors it with Ea - Eb + bias and 1.Ma / 1.Mb.
//
// Operand handling (a choice of this design): an exponent field of 0 reads as
// zero (subnormal operands are flushed to zero); an all-ones exponent field
// reads as infinity (fraction 0) or NaN (fraction not 0). 0 x inf, 0/0,
// inf/inf and any NaN operand give the quiet NaN {0, all ones, 10...0} and
// raise `invalid`. x/0 gives a signed infinity. These operand cases bypass
// the datapath and never raise overflow or underflow.
//
// Ports: a, b operand words; div (0 multiply, 1 divide); result word;
// overflow, underflow, invalid flags. Purely combinational: the result is
// valid one propagation delay after the operands.
module fp_muldiv #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  input  logic                 div,
  output logic [EXP_W+MAN_W:0] result,
  output logic                 overflow,
  output logic                 underflow,
  output logic                 invalid
);

  localparam int unsigned N = MAN_W + 1;  // significand width with hidden bit
  localparam logic [EXP_W+MAN_W:0] QNAN = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};

  // Operand fields and classes.
  logic             sa, sb;
  logic [EXP_W-1:0] ea, eb;
  logic [MAN_W-1:0] fa, fb;
  logic             a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  assign {sa, ea, fa} = a;
  assign {sb, eb, fb} = b;
  assign a_zero = (ea == '0);
  assign b_zero = (eb == '0);
  assign a_inf  = (ea == '1) && (fa == '0);
  assign b_inf  = (eb == '1) && (fb == '0);
  assign a_nan  = (ea == '1) && (fa != '0);
  assign b_nan  = (eb == '1) && (fb != '0);

  // Shared sign and exponent calculators.
  logic                    s;
  logic signed [EXP_W+1:0] e;

  sign_calc u_sign (.sa(sa), .sb(sb), .s(s));

  exponent_calc #(.EXP_W(EXP_W)) u_exp (.ea(ea), .eb(eb), .div(div), .e(e));

  // Significand cores.
  logic [2*N-1:0] prod;
  logic [N:0]     quot;

  dadda_multiplier #(.N(N)) u_mul (.a({1'b1, fa}), .b({1'b1, fb}), .p(prod));

  mantissa_divider #(.N(N)) u_div (.x({1'b1, fa}), .y({1'b1, fb}), .q(quot));

  // Both cores deliver xx.f...f with MAN_W+1 fraction bits to the normalizer.
  logic [MAN_W+2:0] sig;

  assign sig = div ? {1'b0, quot} : prod[2*N-1 -: MAN_W+3];

  logic [EXP_W+MAN_W:0] norm_result;
  logic                 norm_ovf, norm_unf;

  normalizer #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_norm (
    .sign     (s),
    .exp      (e),
    .sig      (sig),
    .result   (norm_result),
    .overflow (norm_ovf),
    .underflow(norm_unf)
  );

  // Operand-class bypass.
  always_comb begin
    result    = norm_result;
    overflow  = norm_ovf;
    underflow = norm_unf;
    invalid   = 1'b0;
    if (a_nan || b_nan ||
        (!div && ((a_zero && b_inf) || (a_inf && b_zero))) ||
        ( div && ((a_zero && b_zero) || (a_inf && b_inf)))) begin
      result  = QNAN;
      invalid = 1'b1;
    end else if (a_inf || (!div && b_inf) || (div && b_zero)) begin
      result = {s, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    end else if (a_zero || (!div && b_zero) || (div && b_inf)) begin
      result = {s, {(EXP_W+MAN_W){1'b0}}};
    end
    if (a_nan || b_nan || a_inf || b_inf || a_zero || b_zero) begin
      overflow  = 1'b0;
      underflow = 1'b0;
    end
  end

endmodule
