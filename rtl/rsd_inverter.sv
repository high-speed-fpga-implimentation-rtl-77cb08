// rsd_inverter: conditional negation of an RSD number.
//
// Negating an RSD number swaps its plus and minus vectors; no carry is
// involved. When inv is 1 the output is -x, otherwise x. A row of two-way
// multiplexers, one per digit component, purely combinational. Used to turn
// the RSD adder into a subtractor (modular add/subtract, divider).
module rsd_inverter #(
  parameter int unsigned N = 8
) (
  input  logic         inv,
  input  logic [N-1:0] x_p,
  input  logic [N-1:0] x_n,
  output logic [N-1:0] y_p,
  output logic [N-1:0] y_n
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      y_p[i] = inv ? x_n[i] : x_p[i];
      y_n[i] = inv ? x_p[i] : x_n[i];
    end
  end

endmodule
