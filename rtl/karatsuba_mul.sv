// karatsuba_mul: pipelined recursive Karatsuba-Ofman multiplier with an RSD
// result.
//
// An operand of W bits is split into a low half L and a high half H of W/2
// bits. Three half-size products are formed in parallel by three instances
// of this module: z0 = aL*bL, z2 = aH*bH and zm = sa*sb, where sa and sb are
// the low W/2 bits of aH+aL and bH+bL. The carries ca, cb of those two sums
// are handled by correction terms, so every child has the same width and the
// same depth:
//   a*b = z2*2^W + z0 + (zm + (ca*sb + cb*sa)*2^(W/2) + ca*cb*2^W
//                        - z2 - z0) * 2^(W/2)
// The eight terms are summed by a tree of carry-free RSD adders (subtraction
// by swapping plus and minus vectors), so combining costs three adder levels
// whatever W is. Recursion stops at LEAF bits, where an Urdhva-Tiryagbhyam
// multiplier is used.
// Timing: fully pipelined, one new operand pair per cycle. Each recursion
// level ends in a register, so the latency is ecc_pkg::klat(W, LEAF) cycles
// (6 for 256 bits with 8-bit leaves). The carries and half sums wait in a
// delay line while the children work.
// Interface: binary operands a, b; product as an exact RSD number of 2W+2
// digits (p_p - p_n). The adders use the folding mode of rsd_add, which
// keeps every partial sum exact because all of them stay below 2^(2W+1) in
// magnitude; the two spare digits give that headroom.
// W must be LEAF times a power of two. The split-to-8-bits recursion, the
// three parallel sub-multipliers, the RSD combination and the pipelining
// follow the source; the carry correction terms and one register per level
// are this design's choices.
// Lint note: Verilator's lint of this module alone reports z0p..zmn as
// undriven. They are driven by the output ports of the three recursive
// child instances, and the lint pass does not follow the recursion.
// Simulation and synthesis see them driven; the testbench checks the exact
// product.
module karatsuba_mul #(
  parameter int unsigned W    = 256,
  parameter int unsigned LEAF = 8
) (
  input  logic           clk,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W+1:0] p_p,
  output logic [2*W+1:0] p_n
);

  if (W <= LEAF) begin : g_leaf
    logic [2*W-1:0] prod;
    ut_mul #(.W(W)) u_ut (.a(a), .b(b), .p(prod));
    always_ff @(posedge clk) begin
      p_p <= {2'b00, prod};
      p_n <= '0;
    end
  end else begin : g_split
    localparam int unsigned H  = W / 2;
    localparam int unsigned D  = 2 * W + 2;
    localparam int unsigned CL = ecc_pkg::klat(H, LEAF);

    if (W != LEAF * (1 << (ecc_pkg::klat(W, LEAF) - 1))) begin : g_chk
      $error("karatsuba_mul: W must be LEAF times a power of two");
    end

    typedef struct packed {
      logic         ca;
      logic         cb;
      logic [H-1:0] sa;
      logic [H-1:0] sb;
    } side_t;

    logic [H:0] suma, sumb;
    side_t side_in;
    side_t side_d [CL];

    always_comb begin
      suma = {1'b0, a[W-1:H]} + {1'b0, a[H-1:0]};
      sumb = {1'b0, b[W-1:H]} + {1'b0, b[H-1:0]};
      side_in = '{ca: suma[H], cb: sumb[H], sa: suma[H-1:0], sb: sumb[H-1:0]};
    end

    always_ff @(posedge clk) begin
      side_d[0] <= side_in;
      for (int i = 1; i < CL; i++) side_d[i] <= side_d[i-1];
    end

    logic [W+1:0] z0p, z0n, z2p, z2n, zmp, zmn;

    karatsuba_mul #(.W(H), .LEAF(LEAF)) u_lo (
      .clk(clk), .a(a[H-1:0]), .b(b[H-1:0]), .p_p(z0p), .p_n(z0n));
    karatsuba_mul #(.W(H), .LEAF(LEAF)) u_hi (
      .clk(clk), .a(a[W-1:H]), .b(b[W-1:H]), .p_p(z2p), .p_n(z2n));
    karatsuba_mul #(.W(H), .LEAF(LEAF)) u_mid (
      .clk(clk), .a(suma[H-1:0]), .b(sumb[H-1:0]), .p_p(zmp), .p_n(zmn));

    // The eight terms, each a D-digit RSD number.
    logic [D-1:0] tp [8];
    logic [D-1:0] tn [8];
    side_t sd;

    always_comb begin
      sd = side_d[CL-1];
      tp[0] = D'(z0p);                 tn[0] = D'(z0n);
      tp[1] = D'(z2p) << W;            tn[1] = D'(z2n) << W;
      tp[2] = D'(zmp) << H;            tn[2] = D'(zmn) << H;
      tp[3] = D'(z0n) << H;            tn[3] = D'(z0p) << H;   // -z0
      tp[4] = D'(z2n) << H;            tn[4] = D'(z2p) << H;   // -z2
      tp[5] = sd.ca ? (D'(sd.sb) << W) : '0;            tn[5] = '0;
      tp[6] = sd.cb ? (D'(sd.sa) << W) : '0;            tn[6] = '0;
      tp[7] = (sd.ca & sd.cb) ? (D'(1) << (W + H)) : '0; tn[7] = '0;
    end

    logic [D-1:0] l1p [4];
    logic [D-1:0] l1n [4];
    logic [D-1:0] l2p [2];
    logic [D-1:0] l2n [2];
    logic [D-1:0] sp, sn;

    for (genvar g = 0; g < 4; g++) begin : g_l1
      rsd_add #(.N(D), .FOLD(1'b1)) u_add (
        .x_p(tp[2*g]), .x_n(tn[2*g]), .y_p(tp[2*g+1]), .y_n(tn[2*g+1]),
        .s_p(l1p[g]), .s_n(l1n[g]));
    end
    for (genvar g = 0; g < 2; g++) begin : g_l2
      rsd_add #(.N(D), .FOLD(1'b1)) u_add (
        .x_p(l1p[2*g]), .x_n(l1n[2*g]), .y_p(l1p[2*g+1]), .y_n(l1n[2*g+1]),
        .s_p(l2p[g]), .s_n(l2n[g]));
    end
    rsd_add #(.N(D), .FOLD(1'b1)) u_add3 (
      .x_p(l2p[0]), .x_n(l2n[0]), .y_p(l2p[1]), .y_n(l2n[1]),
      .s_p(sp), .s_n(sn));

    always_ff @(posedge clk) begin
      p_p <= sp;
      p_n <= sn;
    end
  end

endmodule
