// rsd_sign: sign and zero detection of an RSD number.
//
// The sign of an RSD number is the sign of its most significant nonzero
// digit, and zero has a single representation (all digits zero). Digit i is
// nonzero with sign + exactly where p and n differ with p[i] = 1, so the
// leading nonzero digit is negative exactly when n > p as unsigned numbers:
// the detector is one N-bit magnitude comparison of the two vectors, plus an
// equality test for zero. Purely combinational.
module rsd_sign #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x_p,
  input  logic [N-1:0] x_n,
  output logic         neg,
  output logic         zero
);

  always_comb begin
    neg  = (x_n > x_p);
    zero = (x_n == x_p);
  end

endmodule
