// wr_add: modular addition/subtraction unit.
//
// Takes x, y and the modulus m from the operand bus as W-digit RSD numbers,
// converts them to binary in a first register stage, and passes them through
// the RSD modular adder/subtractor; the result is registered for the result
// bus. sub selects x - y (1) or x + y (0).
// Timing: done pulses two cycles after start; the result stays on r_p/r_n
// until the next operation. One operation may start every cycle.
// Reset (synchronous, active high) clears the valid bits.
// The wrapper around the modular adder follows the source's block diagram;
// the register stages are this design's choice.
module wr_add #(
  parameter int unsigned W = 256
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         sub,
  input  logic [W-1:0] x_p,
  input  logic [W-1:0] x_n,
  input  logic [W-1:0] y_p,
  input  logic [W-1:0] y_n,
  input  logic [W-1:0] m_p,
  input  logic [W-1:0] m_n,
  output logic         done,
  output logic [W-1:0] r_p,
  output logic [W-1:0] r_n
);

  logic [W-1:0] xb, yb, mb, xq, yq, mq, sp, sn;
  logic         subq, v1;

  rsd2bin #(.N(W)) u_cx (.x_p(x_p), .x_n(x_n), .b(xb));
  rsd2bin #(.N(W)) u_cy (.x_p(y_p), .x_n(y_n), .b(yb));
  rsd2bin #(.N(W)) u_cm (.x_p(m_p), .x_n(m_n), .b(mb));

  mod_addsub_rsd #(.W(W)) u_mas (.sub(subq), .x(xq), .y(yq), .m(mq), .r_p(sp), .r_n(sn));

  always_ff @(posedge clk) begin
    xq   <= xb;
    yq   <= yb;
    mq   <= mb;
    subq <= sub;
    if (v1) begin
      r_p <= sp;
      r_n <= sn;
    end
    if (rst) begin
      v1   <= 1'b0;
      done <= 1'b0;
    end else begin
      v1   <= start;
      done <= v1;
    end
  end

endmodule
