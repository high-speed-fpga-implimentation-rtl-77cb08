// mod_addsub_rsd: modular adder/subtractor built on carry-free RSD adders.
//
// Computes (x + y) mod m or (x - y) mod m for x, y in [0, m). The operands
// enter as binary and become RSD numbers by placing zeros in the minus
// vector. y passes a conditional RSD inverter (sub = 1 negates it), then
//   t1 = x +/- y,  t2 = t1 - m,  t3 = t1 + m
// are formed with RSD adders, t2 and t3 in parallel. The result is t3 when
// t1 is negative, t2 when t2 is not negative, and t1 otherwise. Signs are
// read from the most significant nonzero digit, so no two's-complement
// comparison is needed. Internal numbers carry W+3 digits so all three fit.
// The result is returned as a W-digit RSD number whose value modulo 2^W is
// the residue (its exact value, as it lies in [0, m)).
// Purely combinational. The t1/t2/t3 structure and the inverted y and m
// (x_inv, m_inv) follow the signal names of the source's adder simulation;
// the selection rule by sign detection is this design's choice.
module mod_addsub_rsd #(
  parameter int unsigned W = 256
) (
  input  logic         sub,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] m,
  output logic [W-1:0] r_p,
  output logic [W-1:0] r_n
);

  localparam int unsigned N = W + 3;

  logic [N-1:0] y_p, y_n, m_p, m_n;
  rsd_inverter #(.N(N)) u_yinv (.inv(sub),  .x_p(N'(y)), .x_n('0), .y_p(y_p), .y_n(y_n));
  rsd_inverter #(.N(N)) u_minv (.inv(1'b1), .x_p(N'(m)), .x_n('0), .y_p(m_p), .y_n(m_n));

  logic [N-1:0] t1p, t1n, t2p, t2n, t3p, t3n;
  rsd_add #(.N(N), .FOLD(1'b1)) u_t1 (.x_p(N'(x)), .x_n('0), .y_p(y_p), .y_n(y_n), .s_p(t1p), .s_n(t1n));
  rsd_add #(.N(N), .FOLD(1'b1)) u_t2 (.x_p(t1p), .x_n(t1n), .y_p(m_p), .y_n(m_n), .s_p(t2p), .s_n(t2n));
  rsd_add #(.N(N), .FOLD(1'b1)) u_t3 (.x_p(t1p), .x_n(t1n), .y_p(N'(m)), .y_n('0), .s_p(t3p), .s_n(t3n));

  logic t1_neg, t1_zero, t2_neg, t2_zero;
  rsd_sign #(.N(N)) u_s1 (.x_p(t1p), .x_n(t1n), .neg(t1_neg), .zero(t1_zero));
  rsd_sign #(.N(N)) u_s2 (.x_p(t2p), .x_n(t2n), .neg(t2_neg), .zero(t2_zero));

  always_comb begin
    if (t1_neg) begin
      r_p = t3p[W-1:0];
      r_n = t3n[W-1:0];
    end else if (!t2_neg) begin
      r_p = t2p[W-1:0];
      r_n = t2n[W-1:0];
    end else begin
      r_p = t1p[W-1:0];
      r_n = t1n[W-1:0];
    end
  end

endmodule
