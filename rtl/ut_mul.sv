// ut_mul: Urdhva-Tiryagbhyam ("vertically and crosswise") binary multiplier.
//
// Column k of the product collects every crosswise bit product a[i]&b[j]
// with i + j = k. The column sums are formed independently of each other and
// then accumulated with their weights 2^k into the 2W-bit product. This is
// the small base multiplier at the leaves of the Karatsuba recursion, where
// the source prefers it to further Karatsuba splitting (default 8 bits).
// Purely combinational.
module ut_mul #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [CW-1:0] col [2*W-1];

  always_comb begin
    for (int k = 0; k < 2*W-1; k++) begin
      col[k] = '0;
      for (int i = 0; i < W; i++) begin
        if (k - i >= 0 && k - i < W)
          col[k] = col[k] + CW'(a[i] & b[k-i]);
      end
    end
  end

  always_comb begin
    p = '0;
    for (int k = 0; k < 2*W-1; k++)
      p = p + ((2*W)'(col[k]) << k);
  end

endmodule
