// rsd2bin: RSD to two's-complement binary converter.
//
// The value of an RSD number is p - n, so conversion is one N-bit
// subtraction; it is the only carry-propagating step and is used only at
// the edges of the arithmetic units. The result is the value modulo 2^N:
// read as unsigned for values in [0, 2^N), or as signed for values in
// (-2^(N-1), 2^(N-1)). Purely combinational.
module rsd2bin #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x_p,
  input  logic [N-1:0] x_n,
  output logic [N-1:0] b
);

  always_comb b = x_p - x_n;

endmodule
