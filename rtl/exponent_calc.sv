// exponent_calc: exponent calculator of the multiply/divide datapath.
//
// Both biased exponents already carry the bias, so for a product their sum
// carries it twice and the bias is subtracted once: E = Ea + Eb - BIAS. For a
// quotient the bias cancels in the difference and is added back:
// E = Ea - Eb + BIAS. The result is a signed intermediate exponent, two bits
// wider than the field, so that values below 1 (underflow) and above the
// field's maximum (overflow) survive until the normalizer has adjusted the
// exponent by +-1 and the overflow/underflow check has looked at it.
//
// Ports: ea, eb  biased exponent fields;  div  1 selects the quotient form;
//        e  signed intermediate exponent. Purely combinational.
// The multiply form follows the document; the divide form and the width of
// the intermediate exponent are choices of this design.
module exponent_calc #(
  parameter int unsigned EXP_W = 8
) (
  input  logic                   [EXP_W-1:0] ea,
  input  logic                   [EXP_W-1:0] eb,
  input  logic                               div,
  output logic signed            [EXP_W+1:0] e
);

  localparam logic signed [EXP_W+1:0] BIAS = (EXP_W+2)'((1 << (EXP_W - 1)) - 1);

  logic signed [EXP_W+1:0] ea_s, eb_s;

  assign ea_s = signed'({2'b00, ea});
  assign eb_s = signed'({2'b00, eb});

  always_comb begin
    if (div) e = ea_s - eb_s + BIAS;
    else     e = ea_s + eb_s - BIAS;
  end

endmodule
