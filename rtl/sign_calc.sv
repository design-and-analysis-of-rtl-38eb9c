// sign_calc: sign calculator of the multiply/divide datapath.
//
// The sign of a product or a quotient is the exclusive OR of the two operand
// signs, as the multiplication algorithm prescribes. Purely combinational.
//
// Ports: sa, sb  operand signs;  s  result sign.
module sign_calc (
  input  logic sa,
  input  logic sb,
  output logic s
);

  assign s = sa ^ sb;

endmodule
