// tb_rsd_inverter: checks that the conditional RSD inverter gives -x when
// inv = 1 and x when inv = 0, by comparing digit-vector values.
module tb_rsd_inverter;
  localparam int N = 12;
  logic inv;
  logic [N-1:0] xp, xn, yp, yn;
  int checks = 0, failures = 0;

  rsd_inverter #(.N(N)) dut (.inv(inv), .x_p(xp), .x_n(xn), .y_p(yp), .y_n(yn));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      xp = N'($urandom); xn = N'($urandom); inv = 1'($urandom);
      #1;
      checks++;
      if ((inv && N'(yp - yn) !== N'(xn - xp)) || (!inv && N'(yp - yn) !== N'(xp - xn))) begin
        failures++;
        if (failures < 10) $display("FAIL inv=%0d x=%h/%h y=%h/%h", inv, xp, xn, yp, yn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
