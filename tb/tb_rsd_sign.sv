// tb_rsd_sign: checks sign and zero detection of RSD numbers against the
// digit-by-digit value, including representations of zero with both
// components set and numbers that differ from zero only in one digit.
module tb_rsd_sign;
  localparam int N = 16;
  logic [N-1:0] xp, xn;
  logic neg, zero;
  int checks = 0, failures = 0;

  rsd_sign #(.N(N)) dut (.x_p(xp), .x_n(xn), .neg(neg), .zero(zero));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    for (int t = 0; t < 3000; t++) begin
      xp = N'($urandom); xn = N'($urandom);
      if (t % 4 == 0) xn = xp;                      // zero
      if (t % 4 == 1) begin xn = xp; xp[$urandom % N] ^= 1'b1; end
      #1;
      v = 0;
      for (int i = 0; i < N; i++) v += (int'(xp[i]) - int'(xn[i])) * (1 << i);
      checks++;
      if (neg !== (v < 0) || zero !== (v == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h/%h v=%0d neg=%0d zero=%0d", xp, xn, v, neg, zero);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
