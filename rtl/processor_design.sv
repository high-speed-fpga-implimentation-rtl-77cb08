// processor_design: RSD-based modular arithmetic processor for the NIST
// P-256 prime field.
//
// Structure: an arithmetic unit of three wrapped units (add/subtract,
// Karatsuba multiplier with P-256 reduction, binary-GCD divider), a memory,
// an operand bus from memory to the units, a result bus from the units and
// the external bus into memory, and a controller FSM. Data enter in binary
// and become RSD words on the result bus; values stay in RSD between units;
// the output is converted back to binary.
// Interface: with a, b, m (the modulus) and sel valid and held, a one-cycle
// start runs one operation; done pulses for one cycle with result valid, and
// result holds until the next done.
//   sel = 0: (a + b) mod m      sel = 1: (a - b) mod m
//   sel = 2: (a * b) mod p256   sel = 3: (a / b) mod m  (m odd, b invertible)
// a and b must be below m. Multiplication always reduces by the P-256 prime,
// so m must equal that prime for all four operations to share one field.
// Timing: done rises 5 + L clock edges after the edge that samples start,
// where L is the unit latency (add/sub 2, mul 9, div data dependent, at
// most about 4*256 + 4): 7 for add/sub, 14 for mul.
// Reset is synchronous and active high. The port set follows the source's
// processor_design symbol (a, b, m, sel, clk, reset, start, output, done),
// at the source's 256-digit width; the output port is called result.
module processor_design (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic [255:0] a,
  input  logic [255:0] b,
  input  logic [255:0] m,
  input  logic [1:0]   sel,
  output logic [255:0] result,
  output logic         done
);

  localparam int unsigned W = ecc_pkg::FIELD_W;

  // controller
  logic       add_start, add_sub, mul_start, div_start;
  logic       add_done, mul_done, div_done, div_busy, busy;
  logic       mem_we, res_load;
  logic [2:0] mem_waddr, raddr0;
  logic [1:0] bus_src, ext_sel;

  controller u_ctrl (
    .clk(clk), .rst(reset), .start(start), .sel(sel),
    .add_done(add_done), .mul_done(mul_done), .div_done(div_done),
    .add_start(add_start), .add_sub(add_sub), .mul_start(mul_start),
    .div_start(div_start), .mem_we(mem_we), .mem_waddr(mem_waddr),
    .raddr0(raddr0), .bus_src(bus_src), .ext_sel(ext_sel),
    .res_load(res_load), .done(done), .busy(busy));

  // external bus
  logic [W-1:0] ext;
  always_comb begin
    unique case (ext_sel)
      2'd0:    ext = a;
      2'd1:    ext = b;
      default: ext = m;
    endcase
  end

  // result bus into memory
  logic [W-1:0] add_p, add_n, mul_p, mul_n, div_p, div_n, rb_p, rb_n;
  result_bus #(.W(W)) u_rbus (
    .src(bus_src), .ext(ext), .add_p(add_p), .add_n(add_n),
    .mul_p(mul_p), .mul_n(mul_n), .div_p(div_p), .div_n(div_n),
    .bus_p(rb_p), .bus_n(rb_n));

  // memory and operand bus
  logic [W-1:0] o0_p, o0_n, o1_p, o1_n, o2_p, o2_n;
  ecc_memory #(.W(W), .DEPTH(8)) u_mem (
    .clk(clk), .we(mem_we), .waddr(mem_waddr), .wdata_p(rb_p), .wdata_n(rb_n),
    .raddr0(raddr0), .raddr1(3'd1), .raddr2(3'd2),
    .rdata0_p(o0_p), .rdata0_n(o0_n), .rdata1_p(o1_p), .rdata1_n(o1_n),
    .rdata2_p(o2_p), .rdata2_n(o2_n));

  // arithmetic unit
  wr_add #(.W(W)) u_add (
    .clk(clk), .rst(reset), .start(add_start), .sub(add_sub),
    .x_p(o0_p), .x_n(o0_n), .y_p(o1_p), .y_n(o1_n), .m_p(o2_p), .m_n(o2_n),
    .done(add_done), .r_p(add_p), .r_n(add_n));

  wr_mul u_mul (
    .clk(clk), .rst(reset), .start(mul_start),
    .x_p(o0_p), .x_n(o0_n), .y_p(o1_p), .y_n(o1_n),
    .done(mul_done), .r_p(mul_p), .r_n(mul_n));

  wr_div #(.W(W)) u_div (
    .clk(clk), .rst(reset), .start(div_start),
    .x_p(o0_p), .x_n(o0_n), .y_p(o1_p), .y_n(o1_n), .m_p(o2_p), .m_n(o2_n),
    .busy(div_busy), .done(div_done), .r_p(div_p), .r_n(div_n));

  // RSD to binary conversion of the result word
  logic [W-1:0] res_bin;
  rsd2bin #(.N(W)) u_out (.x_p(o0_p), .x_n(o0_n), .b(res_bin));

  always_ff @(posedge clk) begin
    if (reset)         result <= '0;
    else if (res_load) result <= res_bin;
  end

endmodule
