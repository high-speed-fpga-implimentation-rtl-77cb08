// modp256_rsd: fast reduction modulo the NIST P-256 prime.
//
// The 512-bit product c is cut into sixteen 32-bit words c0..c15 and folded
// with the Solinas identity of P-256 (FIPS 186):
//   c = s1 + 2*s2 + 2*s3 + s4 + s5 - s6 - s7 - s8 - s9  (mod p)
// where each s is a 256-bit arrangement of words of c. Because an RSD number
// is a difference of two binary vectors, each subtracted term rides in the
// minus vector of an added term: (s1,s6), (2s2,s7), (2s3,s8), (s4,s9), (s5,0)
// are five RSD operands summed by a tree of three levels of carry-free RSD
// adders. The sum t lies in (-4*2^256, 7*2^256); it is converted to binary
// and brought into [0, p) by choosing among t - k*p, k = -5..7, in parallel.
// Timing: two pipeline registers, after the RSD tree and after the
// correction; one new product per cycle, result two cycles later.
// The use of NIST reduction over P-256 follows the source; the word
// arrangement is the standard one, and the pairing of terms into RSD
// operands and the parallel final correction are this design's choices.
module modp256_rsd (
  input  logic         clk,
  input  logic [511:0] c,
  output logic [255:0] r
);

  import ecc_pkg::*;

  localparam int unsigned N = 261;

  logic [31:0] w [16];
  always_comb for (int k = 0; k < 16; k++) w[k] = c[32*k +: 32];

  logic [255:0] s1, s2, s3, s4, s5, s6, s7, s8, s9;
  always_comb begin
    s1 = c[255:0];
    s2 = {w[15], w[14], w[13], w[12], w[11], 32'd0, 32'd0, 32'd0};
    s3 = {32'd0, w[15], w[14], w[13], w[12], 32'd0, 32'd0, 32'd0};
    s4 = {w[15], w[14], 32'd0, 32'd0, 32'd0, w[10], w[9], w[8]};
    s5 = {w[8], w[13], w[15], w[14], w[13], w[11], w[10], w[9]};
    s6 = {w[10], w[8], 32'd0, 32'd0, 32'd0, w[13], w[12], w[11]};
    s7 = {w[11], w[9], 32'd0, 32'd0, w[15], w[14], w[13], w[12]};
    s8 = {w[12], 32'd0, w[10], w[9], w[8], w[15], w[14], w[13]};
    s9 = {w[13], 32'd0, w[11], w[10], w[9], 32'd0, w[15], w[14]};
  end

  logic [N-1:0] ap, an, bp, bn, cp, cn, dp, dn, ep, en;
  always_comb begin
    ap = N'(s1);        an = N'(s6);
    bp = N'(s2) << 1;   bn = N'(s7);
    cp = N'(s3) << 1;   cn = N'(s8);
    dp = N'(s4);        dn = N'(s9);
    ep = N'(s5);        en = '0;
  end

  logic [N-1:0] abp, abn, cdp, cdn, qp, qn, tp, tn;
  rsd_add #(.N(N), .FOLD(1'b1)) u_ab (.x_p(ap), .x_n(an), .y_p(bp), .y_n(bn), .s_p(abp), .s_n(abn));
  rsd_add #(.N(N), .FOLD(1'b1)) u_cd (.x_p(cp), .x_n(cn), .y_p(dp), .y_n(dn), .s_p(cdp), .s_n(cdn));
  rsd_add #(.N(N), .FOLD(1'b1)) u_q  (.x_p(abp), .x_n(abn), .y_p(cdp), .y_n(cdn), .s_p(qp), .s_n(qn));
  rsd_add #(.N(N), .FOLD(1'b1)) u_t  (.x_p(qp), .x_n(qn), .y_p(ep), .y_n(en), .s_p(tp), .s_n(tn));

  logic [N-1:0] tp_q, tn_q;
  always_ff @(posedge clk) begin
    tp_q <= tp;
    tn_q <= tn;
  end

  logic signed [N-1:0] t;
  rsd2bin #(.N(N)) u_conv (.x_p(tp_q), .x_n(tn_q), .b(t));

  logic [255:0] rsel;
  always_comb begin
    rsel = '0;
    for (int k = -5; k <= 7; k++) begin
      logic signed [N-1:0] cand;
      cand = t - N'(k) * $signed({5'd0, P256});
      if (cand >= 0 && cand < $signed({5'd0, P256}))
        rsel = cand[255:0];
    end
  end

  always_ff @(posedge clk) r <= rsel;

endmodule
