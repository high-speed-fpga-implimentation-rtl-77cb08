// tb_rsd2bin: checks the RSD to binary converter against the value of the
// digit vector summed digit by digit.
module tb_rsd2bin;
  localparam int N = 20;
  logic [N-1:0] xp, xn, b;
  int checks = 0, failures = 0;

  rsd2bin #(.N(N)) dut (.x_p(xp), .x_n(xn), .b(b));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v;
    for (int t = 0; t < 2000; t++) begin
      xp = N'($urandom); xn = N'($urandom);
      #1;
      v = 0;
      for (int i = 0; i < N; i++) v += (longint'(xp[i]) - longint'(xn[i])) <<< i;
      checks++;
      if (b !== N'(v)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h/%h b=%h exp=%h", xp, xn, b, N'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
