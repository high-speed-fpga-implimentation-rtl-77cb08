// wr_div: modular division unit.
//
// Converts the W-digit RSD operands x, y and the modulus m from the operand
// bus to binary in one register stage and runs the binary-GCD RSD divider
// on them, giving x / y mod m as a W-digit RSD number.
// Timing: done pulses one cycle plus the divider's data-dependent run time
// after start (at most about 4*W + 4 cycles); start is ignored while busy.
// Reset is synchronous, active high.
// The wrapper follows the source's block diagram; the conversion stage is
// this design's choice.
module wr_div #(
  parameter int unsigned W = 256
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] x_p,
  input  logic [W-1:0] x_n,
  input  logic [W-1:0] y_p,
  input  logic [W-1:0] y_n,
  input  logic [W-1:0] m_p,
  input  logic [W-1:0] m_n,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] r_p,
  output logic [W-1:0] r_n
);

  logic [W-1:0] xb, yb, mb, xq, yq, mq;
  logic         go, dbusy;

  rsd2bin #(.N(W)) u_cx (.x_p(x_p), .x_n(x_n), .b(xb));
  rsd2bin #(.N(W)) u_cy (.x_p(y_p), .x_n(y_n), .b(yb));
  rsd2bin #(.N(W)) u_cm (.x_p(m_p), .x_n(m_n), .b(mb));

  always_ff @(posedge clk) begin
    if (start && !busy) begin
      xq <= xb;
      yq <= yb;
      mq <= mb;
    end
    if (rst) go <= 1'b0;
    else     go <= start && !busy;
  end

  div_rsd #(.W(W)) u_div (
    .clk(clk), .rst(rst), .start(go), .a(xq), .b(yq), .m(mq),
    .busy(dbusy), .done(done), .r_p(r_p), .r_n(r_n));

  assign busy = go | dbusy;

endmodule
