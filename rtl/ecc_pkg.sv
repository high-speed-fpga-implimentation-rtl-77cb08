// ecc_pkg: constants and types shared by the RSD ECC arithmetic processor.
//
// FIELD_W is the operand width of the arithmetic unit (256 digits, the NIST
// P-256 field). P256 is the field prime used by the fixed-prime reduction in
// the multiplier path. op_e is the encoding of the two-bit operation select
// of the processor; the encoding itself is a choice of this design.
// A redundant signed digit (RSD) number of N digits is carried as two N-bit
// vectors, plus (p) and minus (n); its value is p - n.
package ecc_pkg;

  localparam int unsigned FIELD_W = 256;

  localparam logic [255:0] P256 =
    256'hFFFFFFFF_00000001_00000000_00000000_00000000_FFFFFFFF_FFFFFFFF_FFFFFFFF;

  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_MUL = 2'd2,
    OP_DIV = 2'd3
  } op_e;

  // Pipeline depth of karatsuba_mul: one register per recursion level,
  // counting the leaf multiplier as a level.
  function automatic int unsigned klat(input int unsigned w, input int unsigned leaf);
    int unsigned l;
    int unsigned ww;
    l  = 1;
    ww = w;
    while (ww > leaf) begin
      ww = ww / 2;
      l  = l + 1;
    end
    return l;
  endfunction

endpackage
