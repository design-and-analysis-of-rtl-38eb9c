// fp_pkg: types and constants shared by the multimode floating point unit.
//
// The format defaults are IEEE 754 binary32: 1 sign bit, 8 exponent bits with
// a bias of 127, 23 stored mantissa bits and a hidden leading one. Every
// module takes the exponent and mantissa widths as parameters so that the
// same datapath can also be built for a reduced format (fewer mantissa bits,
// hidden bit kept), as in the worked 4-bit-mantissa multiplication example.
//
// The operation encoding of the mode input is a choice of this design.
package fp_pkg;

  localparam int unsigned FP_EXP_W = 8;   // exponent field width
  localparam int unsigned FP_MAN_W = 23;  // stored mantissa (fraction) width

  // Operation selected by the multimode unit's mode input.
  typedef enum logic [1:0] {
    OP_ADD = 2'b00,
    OP_SUB = 2'b01,
    OP_MUL = 2'b10,
    OP_DIV = 2'b11
  } fp_op_e;

endpackage
