// tb_rsd_add: self-checking test of the carry-free RSD adder.
// Two 16-digit instances: FOLD = 0 is checked modulo 2^16 on fully random
// digit vectors; FOLD = 1 is checked for the exact signed sum on operands
// whose digits occupy the low 14 positions (so |x + y| < 2^15), with the
// value of the result read digit by digit.
module tb_rsd_add;
  localparam int N = 16;
  logic [N-1:0] xp, xn, yp, yn, s0p, s0n, s1p, s1n;
  int checks = 0, failures = 0;

  rsd_add #(.N(N), .FOLD(1'b0)) dut0 (.x_p(xp), .x_n(xn), .y_p(yp), .y_n(yn), .s_p(s0p), .s_n(s0n));
  rsd_add #(.N(N), .FOLD(1'b1)) dut1 (.x_p(xp), .x_n(xn), .y_p(yp), .y_n(yn), .s_p(s1p), .s_n(s1n));

  function automatic int rsd_val(input logic [N-1:0] p, input logic [N-1:0] n);
    int v = 0;
    for (int i = 0; i < N; i++) v += (int'(p[i]) - int'(n[i])) * (1 << i);
    return v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_v, got;
    for (int t = 0; t < 4000; t++) begin
      xp = N'($urandom); xn = N'($urandom); yp = N'($urandom); yn = N'($urandom);
      #1;
      checks++;
      if (N'(s0p - s0n) !== N'((xp - xn) + (yp - yn))) begin
        failures++;
        if (failures < 10) $display("FAIL wrap x=%h/%h y=%h/%h s=%h/%h", xp, xn, yp, yn, s0p, s0n);
      end
      xp = xp & 16'h3fff; xn = xn & 16'h3fff; yp = yp & 16'h3fff; yn = yn & 16'h3fff;
      // make some operands dense in high digits to force transfers to the top
      if (t % 3 == 0) begin xp = xp | 16'h3000; yp = yp | 16'h3000; xn = xn & 16'h0fff; yn = yn & 16'h0fff; end
      if (t % 3 == 1) begin xn = xn | 16'h3000; yn = yn | 16'h3000; xp = xp & 16'h0fff; yp = yp & 16'h0fff; end
      #1;
      ref_v = rsd_val(xp, xn) + rsd_val(yp, yn);
      got   = rsd_val(s1p, s1n);
      checks++;
      if (got != ref_v) begin
        failures++;
        if (failures < 10) $display("FAIL fold x=%h/%h y=%h/%h got %0d exp %0d", xp, xn, yp, yn, got, ref_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
