// tb_wr_add: checks the modular add/subtract unit at 32 bits with random
// odd and even moduli and RSD operands in random redundant encodings;
// results must equal (x +/- y) mod m with done exactly two cycles after
// start.
module tb_wr_add;
  localparam int W = 32;
  logic clk = 0, rst = 1, start, sub, done;
  logic [W-1:0] xp, xn, yp, yn, mp, mn, rp, rn;
  int checks = 0, failures = 0;

  wr_add #(.W(W)) dut (.clk(clk), .rst(rst), .start(start), .sub(sub),
    .x_p(xp), .x_n(xn), .y_p(yp), .y_n(yn), .m_p(mp), .m_n(mn),
    .done(done), .r_p(rp), .r_n(rn));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; sub = 0; xp = 0; xn = 0; yp = 0; yn = 0; mp = 0; mn = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 1000; t++) begin
      logic [W-1:0] x, y, m, k;
      longint e;
      int c;
      m = $urandom; if (m < 2) m = 2;
      x = $urandom % m; y = $urandom % m;
      k = $urandom >> 2;
      xp = x + k; xn = k;
      k = $urandom >> 2;
      yp = y + k; yn = k;
      mp = m; mn = 0;
      sub = 1'($urandom);
      e = sub ? longint'(x) - longint'(y) : longint'(x) + longint'(y);
      if (e < 0) e += longint'(m); else if (e >= longint'(m)) e -= longint'(m);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      c = 1;
      while (!done && c < 10) begin @(negedge clk); c++; end
      checks++;
      if (W'(rp - rn) !== W'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL sub=%0d %0d %0d m=%0d got %0d", sub, x, y, m, W'(rp - rn));
      end
      checks++;
      if (c != 2) begin failures++; $display("FAIL latency %0d", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
