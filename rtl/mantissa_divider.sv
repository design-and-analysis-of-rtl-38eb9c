// mantissa_divider: significand divider of the combined multiply/divide unit.
//
// Computes q = floor(x * 2^N / y) for two normalized N-bit significands
// (both with their most significant bit set), so x/y lies in (1/2, 2) and q
// has N+1 bits: one integer bit and N fraction bits. The quotient is produced
// by restoring division, one quotient bit per row of an unrolled array: the
// partial remainder is compared with y, y is subtracted when it fits, and the
// remainder is shifted left for the next bit. The discarded remainder makes
// the quotient a truncation, matching the truncating rounding of the
// multiplier path.
//
// Ports: x (dividend significand), y (divisor significand), q (quotient).
// Purely combinational. The document names a division operation but does
// not describe the divider; the restoring array is this design's choice.
module mantissa_divider #(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N:0]   q
);

  always_comb begin
    logic [N+1:0] rem;
    rem = {2'b00, x};
    for (int i = int'(N); i >= 0; i--) begin
      if (rem >= {2'b00, y}) begin
        q[i] = 1'b1;
        rem  = rem - {2'b00, y};
      end else begin
        q[i] = 1'b0;
      end
      rem = rem << 1;
    end
  end

endmodule
