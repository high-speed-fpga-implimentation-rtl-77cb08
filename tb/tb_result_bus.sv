// tb_result_bus: checks that each source value reaches the bus when
// selected, and that external binary data appear with a zero minus vector.
module tb_result_bus;
  localparam int W = 16;
  logic [1:0] src;
  logic [W-1:0] ext, ap, an, mp, mn, dp, dn, bp, bn;
  int checks = 0, failures = 0;

  result_bus #(.W(W)) dut (.src(src), .ext(ext), .add_p(ap), .add_n(an),
    .mul_p(mp), .mul_n(mn), .div_p(dp), .div_n(dn), .bus_p(bp), .bus_n(bn));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] ep, en;
    for (int t = 0; t < 400; t++) begin
      src = 2'(t % 4);
      ext = W'($urandom); ap = W'($urandom); an = W'($urandom); mp = W'($urandom);
      mn = W'($urandom); dp = W'($urandom); dn = W'($urandom);
      #1;
      case (src)
        2'd0: begin ep = ext; en = '0; end
        2'd1: begin ep = ap;  en = an; end
        2'd2: begin ep = mp;  en = mn; end
        default: begin ep = dp; en = dn; end
      endcase
      checks++;
      if (bp !== ep || bn !== en) begin
        failures++;
        if (failures < 10) $display("FAIL src=%0d", src);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
