// ecc_memory: operand and result memory of the processor.
//
// DEPTH words, each one W-digit RSD number (plus and minus vectors). One
// synchronous write port fed by the result bus and three asynchronous read
// ports driving the operand bus (two operands and the modulus are needed by
// the units at the same time). Contents are not reset: every word is written
// before it is read.
// The memory as a block between the two buses follows the source's block
// diagram; its depth, word format and port count are this design's choice.
module ecc_memory #(
  parameter int unsigned W     = 256,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata_p,
  input  logic [W-1:0]  wdata_n,
  input  logic [AW-1:0] raddr0,
  input  logic [AW-1:0] raddr1,
  input  logic [AW-1:0] raddr2,
  output logic [W-1:0]  rdata0_p,
  output logic [W-1:0]  rdata0_n,
  output logic [W-1:0]  rdata1_p,
  output logic [W-1:0]  rdata1_n,
  output logic [W-1:0]  rdata2_p,
  output logic [W-1:0]  rdata2_n
);

  logic [2*W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= {wdata_p, wdata_n};
  end

  assign {rdata0_p, rdata0_n} = mem[raddr0];
  assign {rdata1_p, rdata1_n} = mem[raddr1];
  assign {rdata2_p, rdata2_n} = mem[raddr2];

endmodule
