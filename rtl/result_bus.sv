// result_bus: the result-side RSD data bus of the processor.
//
// Carries one W-digit RSD word into memory from one of four sources: the
// external bus (binary data turned into RSD by putting zeros in the minus
// vector, the binary-to-RSD conversion), the add/subtract unit, the
// multiplication unit or the division unit. src chooses the driver.
// Purely combinational. The bus itself follows the source's block diagram;
// modelling it as a multiplexer is this design's choice.
module result_bus #(
  parameter int unsigned W = 256
) (
  input  logic [1:0]   src,      // 0 external, 1 add/sub, 2 mul, 3 div
  input  logic [W-1:0] ext,
  input  logic [W-1:0] add_p,
  input  logic [W-1:0] add_n,
  input  logic [W-1:0] mul_p,
  input  logic [W-1:0] mul_n,
  input  logic [W-1:0] div_p,
  input  logic [W-1:0] div_n,
  output logic [W-1:0] bus_p,
  output logic [W-1:0] bus_n
);

  always_comb begin
    unique case (src)
      2'd0: begin bus_p = ext;   bus_n = '0;    end
      2'd1: begin bus_p = add_p; bus_n = add_n; end
      2'd2: begin bus_p = mul_p; bus_n = mul_n; end
      default: begin bus_p = div_p; bus_n = div_n; end
    endcase
  end

endmodule
