// tb_wr_div: checks the modular division unit at 16 bits with the prime
// 65521 and RSD operands in random redundant encodings: r*y = x mod m,
// r in [0, m), done within 4*W + 4 cycles of the start, and a second start
// while busy ignored (exactly one done per operation).
module tb_wr_div;
  localparam int W = 16;
  localparam int M = 65521;
  logic clk = 0, rst = 1, start, done, busy;
  logic [W-1:0] xp, xn, yp, yn, mp, mn, rp, rn;
  int checks = 0, failures = 0, ndone = 0;

  wr_div #(.W(W)) dut (.clk(clk), .rst(rst), .start(start),
    .x_p(xp), .x_n(xn), .y_p(yp), .y_n(yn), .m_p(mp), .m_n(mn),
    .busy(busy), .done(done), .r_p(rp), .r_n(rn));

  always #5 clk = ~clk;
  always @(posedge clk) if (done) ndone++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input int x, input int y, input bit poke);
    int c, r, k;
    k = $urandom % 4096;
    xp = W'(x + k); xn = W'(k);
    k = $urandom % 4096;
    yp = W'(y + k); yn = W'(k);
    mp = W'(M + k); mn = W'(k);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = poke;
    @(negedge clk);
    start = 0;
    c = 2;
    while (!done && c < 200) begin @(negedge clk); c++; end
    r = int'(W'(rp - rn));
    checks++;
    if (r >= M || (longint'(r) * longint'(y)) % longint'(M) != longint'(x)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d/%0d got %0d", x, y, r);
    end
    checks++;
    if (c > 4 * W + 4) begin failures++; $display("FAIL cycles %0d", c); end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    start = 0; xp = 0; xn = 0; yp = 0; yn = 0; mp = 0; mn = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 300; t++)
      run_one(int'($urandom % M), int'(1 + $urandom % (M - 1)), t % 5 == 0);
    checks++;
    if (ndone != 300) begin failures++; $display("FAIL done count %0d", ndone); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
