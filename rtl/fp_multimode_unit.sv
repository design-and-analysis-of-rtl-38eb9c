// fp_multimode_unit: multimode single precision floating point arithmetic unit.
//
// Four operations on IEEE 754 binary32 words, selected by a 2-bit mode:
// add, subtract, multiply and divide. Instead of four separate units the
// design uses two combined ones, which is where its area saving comes from:
// fp_addsub serves addition and subtraction (subtraction flips the sign of
// b), and fp_muldiv serves multiplication and division with one shared sign
// calculator, exponent calculator and normalization unit. The mode picks the
// operation inside each unit and then which unit drives the outputs.
//
// Ports:
//   a, b       operand words (sign, exponent, mantissa)
//   mode       fp_pkg::fp_op_e: 00 add, 01 subtract, 10 multiply, 11 divide
//   result     result word, rounded toward zero (truncated)
//   overflow   result exponent too large; result is +-infinity
//   underflow  result exponent below the normal range; result is +-zero
//   invalid    invalid operation (NaN operand, 0 x inf, inf - inf, 0/0,
//              inf/inf); result is the quiet NaN
//   cvt_sign, cvt_int, cvt_frac  a signed fixed-point binary number
//              (integer part, binary fraction) to be converted
//   cvt_result the converted floating point word (truncated), with
//   cvt_overflow / cvt_underflow from the same range check
// The converter (bin_to_float) stands beside the arithmetic units so that
// plain binary values can be turned into operand words; it shares only the
// overflow/underflow block type with them.
// Timing: purely combinational, no clock; the result follows the operands
// and the mode after the propagation delay. The mode encoding, the flags
// beyond overflow/underflow and the operand-class handling are choices of
// this design. EXP_W/MAN_W default to binary32 and may be reduced to build
// a smaller format with the same structure.
module fp_multimode_unit
  import fp_pkg::*;
#(
  parameter int unsigned EXP_W = FP_EXP_W,
  parameter int unsigned MAN_W = FP_MAN_W,
  parameter int unsigned CVT_INT_W  = 32,
  parameter int unsigned CVT_FRAC_W = 32
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  input  fp_op_e               mode,
  output logic [EXP_W+MAN_W:0] result,
  output logic                 overflow,
  output logic                 underflow,
  output logic                 invalid,
  input  logic                  cvt_sign,
  input  logic [CVT_INT_W-1:0]  cvt_int,
  input  logic [CVT_FRAC_W-1:0] cvt_frac,
  output logic [EXP_W+MAN_W:0]  cvt_result,
  output logic                  cvt_overflow,
  output logic                  cvt_underflow
);

  logic [EXP_W+MAN_W:0] as_result, md_result;
  logic                 as_ovf, as_unf, as_inv;
  logic                 md_ovf, md_unf, md_inv;

  fp_addsub #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_addsub (
    .a        (a),
    .b        (b),
    .sub      (mode == OP_SUB),
    .result   (as_result),
    .overflow (as_ovf),
    .underflow(as_unf),
    .invalid  (as_inv)
  );

  fp_muldiv #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_muldiv (
    .a        (a),
    .b        (b),
    .div      (mode == OP_DIV),
    .result   (md_result),
    .overflow (md_ovf),
    .underflow(md_unf),
    .invalid  (md_inv)
  );

  bin_to_float #(
    .INT_W (CVT_INT_W),
    .FRAC_W(CVT_FRAC_W),
    .EXP_W (EXP_W),
    .MAN_W (MAN_W)
  ) u_cvt (
    .sign     (cvt_sign),
    .int_part (cvt_int),
    .frac_part(cvt_frac),
    .result   (cvt_result),
    .overflow (cvt_overflow),
    .underflow(cvt_underflow)
  );

  always_comb begin
    unique case (mode)
      OP_ADD, OP_SUB: begin
        result    = as_result;
        overflow  = as_ovf;
        underflow = as_unf;
        invalid   = as_inv;
      end
      default: begin
        result    = md_result;
        overflow  = md_ovf;
        underflow = md_unf;
        invalid   = md_inv;
      end
    endcase
  end

endmodule
