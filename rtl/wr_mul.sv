// wr_mul: modular multiplication unit over the NIST P-256 prime.
//
// Operands arrive from the operand bus as 256-digit RSD numbers and are
// converted to binary in the first pipeline stage. The pipelined Karatsuba
// multiplier forms the 512-digit RSD product, which is converted to binary
// and reduced by the P-256 fast reduction. The result leaves in RSD form
// (minus vector zero) for the result bus.
// Timing: fully pipelined. A start pulse with operands valid gives a done
// pulse exactly LAT = 1 + klat(256, 8) + 2 = 9 cycles later, with the result
// on r_p/r_n during that cycle; a new operation may start every cycle.
// Reset (synchronous, active high) clears only the valid pipeline.
// The multiplier/reducer pairing inside one wrapper follows the source's
// block diagram; the stage boundaries are this design's choice.
module wr_mul #(
  parameter int unsigned LEAF = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [255:0] x_p,
  input  logic [255:0] x_n,
  input  logic [255:0] y_p,
  input  logic [255:0] y_n,
  output logic         done,
  output logic [255:0] r_p,
  output logic [255:0] r_n
);

  localparam int unsigned KL  = ecc_pkg::klat(256, LEAF);
  localparam int unsigned LAT = 1 + KL + 2;

  logic [255:0] xb, yb, xq, yq;
  rsd2bin #(.N(256)) u_cx (.x_p(x_p), .x_n(x_n), .b(xb));
  rsd2bin #(.N(256)) u_cy (.x_p(y_p), .x_n(y_n), .b(yb));

  always_ff @(posedge clk) begin
    xq <= xb;
    yq <= yb;
  end

  logic [513:0] pp, pn;
  logic [511:0] pb;
  karatsuba_mul #(.W(256), .LEAF(LEAF)) u_kmul (.clk(clk), .a(xq), .b(yq), .p_p(pp), .p_n(pn));
  rsd2bin #(.N(512)) u_cp (.x_p(pp[511:0]), .x_n(pn[511:0]), .b(pb));

  logic [255:0] rb;
  modp256_rsd u_red (.clk(clk), .c(pb), .r(rb));

  logic [LAT-1:0] vld;
  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[LAT-2:0], start};
  end

  assign done = vld[LAT-1];
  assign r_p  = rb;
  assign r_n  = '0;

endmodule
