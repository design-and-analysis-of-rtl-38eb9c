// fp_addsub: combined floating point add/subtract unit.
//
// Subtraction is addition with the sign of b inverted, so one datapath
// serves both operations. The operands are ordered by magnitude, the smaller
// significand is shifted right by the exponent difference into a field with
// three extra low bits (guard, round and a sticky bit that ORs together
// everything shifted further), and the significands are added or subtracted
// according to the effective signs. The sum is then normalized: a carry out
// shifts it right by one (exponent + 1); leading zeros after a cancellation
// shift it left (exponent - count). The fraction is truncated (round toward
// zero, as in the multiply path), which the three extra bits make exact.
// The shared ovf_unf_detect block turns the exponent into +-infinity or
// +-zero with the overflow or underflow flag.
//
// Operand handling (a choice of this design): exponent field 0 reads as zero
// (subnormals flushed), all-ones as infinity or NaN. inf - inf and NaN
// operands give the quiet NaN and raise `invalid`. An exact zero result is
// +0, except (-0) + (-0) = -0.
//
// Ports: a, b operand words; sub (0 add, 1 subtract); result word;
// overflow, underflow, invalid flags. Purely combinational. The document
// names this unit but does not describe its insides.
module fp_addsub #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  input  logic                 sub,
  output logic [EXP_W+MAN_W:0] result,
  output logic                 overflow,
  output logic                 underflow,
  output logic                 invalid
);

  localparam int unsigned W  = MAN_W + 4;  // 1.f plus guard, round, sticky
  localparam int unsigned EW = EXP_W + 2;  // signed intermediate exponent
  localparam logic [EXP_W+MAN_W:0] QNAN = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};

  logic             sa, sb;
  logic [EXP_W-1:0] ea, eb;
  logic [MAN_W-1:0] fa, fb;
  logic             a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  assign {sa, ea, fa} = a;
  assign sb = b[EXP_W+MAN_W] ^ sub;  // effective sign of b
  assign eb = b[EXP_W+MAN_W-1:MAN_W];
  assign fb = b[MAN_W-1:0];
  assign a_zero = (ea == '0);
  assign b_zero = (eb == '0);
  assign a_inf  = (ea == '1) && (fa == '0);
  assign b_inf  = (eb == '1) && (fb == '0);
  assign a_nan  = (ea == '1) && (fa != '0);
  assign b_nan  = (eb == '1) && (fb != '0);

  // Magnitude order, alignment and significand add/subtract.
  logic             sl;            // sign of the larger operand
  logic [EXP_W-1:0] el, es;        // larger / smaller exponent
  logic [MAN_W-1:0] fl, fs;        // larger / smaller fraction
  logic             eff_sub;
  logic [W-1:0]     sig_l, sig_s;  // aligned significands
  logic [W:0]       sum;
  logic [EXP_W-1:0] shamt;

  always_comb begin
    if ({ea, fa} >= {eb, fb}) begin
      sl = sa; el = ea; fl = fa; es = eb; fs = fb;
    end else begin
      sl = sb; el = eb; fl = fb; es = ea; fs = fa;
    end
    eff_sub = sa ^ sb;
    shamt   = el - es;
    sig_l   = {1'b1, fl, 3'b000};
    sig_s   = {1'b1, fs, 3'b000};
    // Right shift with sticky: every bit shifted below the field is ORed
    // into the lowest bit.
    for (int i = 0; i < int'(W); i++) begin
      if (int'(shamt) > i) sig_s = {1'b0, sig_s[W-1:2], sig_s[1] | sig_s[0]};
    end
    if (eff_sub) sum = {1'b0, sig_l} - {1'b0, sig_s};
    else         sum = {1'b0, sig_l} + {1'b0, sig_s};
  end

  // Normalization: carry out or leading-zero count.
  logic signed [EW-1:0] exp_n;
  logic [W:0]           sum_n;
  int unsigned          lz;

  always_comb begin
    // Leading zeros of sum[W-1:0]; W when the sum is zero.
    lz = W;
    for (int i = 0; i < int'(W); i++) begin
      if (sum[i]) lz = W - 1 - i;
    end
    if (sum[W]) begin
      sum_n = sum >> 1;
      exp_n = signed'(EW'(el)) + 1;
    end else begin
      sum_n = sum << lz;
      exp_n = signed'(EW'(el)) - signed'(EW'(lz));
    end
  end

  logic [EXP_W+MAN_W:0] norm_result;
  logic                 norm_ovf, norm_unf;

  ovf_unf_detect #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_detect (
    .sign     (sl),
    .exp      (exp_n),
    .frac     (sum_n[W-2 -: MAN_W]),
    .result   (norm_result),
    .overflow (norm_ovf),
    .underflow(norm_unf)
  );

  // Operand-class bypass and exact zero.
  always_comb begin
    result    = norm_result;
    overflow  = norm_ovf;
    underflow = norm_unf;
    invalid   = 1'b0;
    if (a_nan || b_nan || (a_inf && b_inf && eff_sub)) begin
      result  = QNAN;
      invalid = 1'b1;
    end else if (a_inf) begin
      result = {sa, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    end else if (b_inf) begin
      result = {sb, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    end else if (a_zero && b_zero) begin
      result = {sa & sb, {(EXP_W+MAN_W){1'b0}}};
    end else if (a_zero) begin
      result = {sb, eb, fb};
    end else if (b_zero) begin
      result = a;
    end else if (sum == '0) begin
      result = '0;
    end
    if (a_nan || b_nan || a_inf || b_inf || a_zero || b_zero || sum == '0) begin
      overflow  = 1'b0;
      underflow = 1'b0;
    end
  end

endmodule
