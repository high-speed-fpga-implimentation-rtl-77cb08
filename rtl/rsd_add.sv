// rsd_add: carry-free adder for redundant signed digit (RSD) numbers.
//
// Each operand is N digits in {-1,0,1}, carried as a plus vector and a minus
// vector (value = p - n). The sum is formed in two levels of full adders with
// no carry chain: level 1 adds x_p + y_p - x_n per digit, giving a positive
// transfer to the next digit and a negative local digit; level 2 adds that
// transfer against the local digit and y_n, giving a positive local digit and
// a negative transfer. The delay is two full-adder cells for any N.
// The exact sum needs N+2 digits. Two ways of returning N digits:
//   FOLD = 0: the top two digits are dropped, so the result equals the sum
//             modulo 2^N (used where only the value modulo 2^N matters).
//   FOLD = 1: the caller guarantees |x + y| < 2^(N-1); the three top digits
//             are then worth -1, 0 or +1 times 2^(N-1) and are folded into
//             digit N-1, so the result is the exact signed sum.
// Purely combinational. The two-level cell structure is this design's choice;
// the source describes the adder only as carry-free RSD addition.
module rsd_add #(
  parameter int unsigned N    = 8,
  parameter bit          FOLD = 1'b0
) (
  input  logic [N-1:0] x_p,
  input  logic [N-1:0] x_n,
  input  logic [N-1:0] y_p,
  input  logic [N-1:0] y_n,
  output logic [N-1:0] s_p,
  output logic [N-1:0] s_n
);

  logic [N:0]   t;   // level-1 positive transfers, weight 2^i at index i
  logic [N:0]   u;   // level-1 negative local digits
  logic [N:0]   zp;  // level-2 positive local digits
  logic [N+1:0] zn;  // level-2 negative transfers
  logic [N:0]   a2, b2, c2;
  logic signed [4:0] top;

  // Both levels are rows of full adders written as vector operations.
  always_comb begin
    // level 1: x_p + y_p + ~x_n = 2*t + s  ->  x_p + y_p - x_n = 2*t - ~s
    u = {1'b0, ~(x_p ^ y_p ^ ~x_n)};
    t = {(x_p & y_p) | (x_p & ~x_n) | (y_p & ~x_n), 1'b0};
    // level 2: u + y_n + ~t = 2*c + s  ->  t - u - y_n = ~s - 2*c
    a2 = u;
    b2 = {1'b0, y_n};
    c2 = ~t;
    zp = ~(a2 ^ b2 ^ c2);
    zn = {(a2 & b2) | (a2 & c2) | (b2 & c2), 1'b0};
  end

  always_comb begin
    s_p = zp[N-1:0];
    s_n = zn[N-1:0];
    top = '0;
    if (FOLD) begin
      top = 5'(signed'({1'b0, zp[N-1]})) - 5'(signed'({1'b0, zn[N-1]}))
          + 5'(signed'({1'b0, zp[N], 1'b0})) - 5'(signed'({1'b0, zn[N], 1'b0}))
          - 5'(signed'({1'b0, zn[N+1], 2'b00}));
      s_p[N-1] = (top == 5'sd1);
      s_n[N-1] = (top == -5'sd1);
    end
  end

endmodule
