// tb_div_rsd: checks the binary-GCD modular divider at 16 bits with the
// primes 65521 and 40961 and at 256 bits with the P-256 prime. Each result
// r must satisfy r*b = a (mod m) and lie in [0, m); the cycle count from
// start to done must stay within 4*W + 3. Division by zero must end with 0.
module tb_div_rsd;
  import ecc_pkg::*;
  localparam int WS = 16;
  logic clk = 0, rst = 1;
  logic ss, sl, bs, bl, ds, dl;
  logic [WS-1:0] as_, bs_, ms, rsp, rsn;
  logic [255:0] al, bl_, rlp, rln;
  int checks = 0, failures = 0;
  int maxc_s = 0, maxc_l = 0;

  div_rsd #(.W(WS)) dut_s (.clk(clk), .rst(rst), .start(ss), .a(as_), .b(bs_), .m(ms),
                           .busy(bs), .done(ds), .r_p(rsp), .r_n(rsn));
  div_rsd dut_l (.clk(clk), .rst(rst), .start(sl), .a(al), .b(bl_), .m(P256),
                 .busy(bl), .done(dl), .r_p(rlp), .r_n(rln));

  always #5 clk = ~clk;

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_small(input logic [WS-1:0] a, input logic [WS-1:0] b, input logic [WS-1:0] m);
    int c = 0;
    logic [WS-1:0] r;
    @(negedge clk);
    as_ = a; bs_ = b; ms = m; ss = 1;
    @(negedge clk);
    ss = 0;
    while (!ds) begin @(negedge clk); c++; end
    r = WS'(rsp - rsn);
    if (c > maxc_s) maxc_s = c;
    checks++;
    if (b == 0 ? (r != 0) : (r >= m || (32'(r) * 32'(b)) % 32'(m) != 32'(a))) begin
      failures++;
      if (failures < 10) $display("FAIL16 %0d/%0d mod %0d got %0d", a, b, m, r);
    end
    checks++;
    if (c > 4 * WS + 3) begin failures++; $display("FAIL16 cycles %0d", c); end
  endtask

  task automatic run_large(input logic [255:0] a, input logic [255:0] b);
    int c = 0;
    logic [255:0] r;
    @(negedge clk);
    al = a; bl_ = b; sl = 1;
    @(negedge clk);
    sl = 0;
    while (!dl) begin @(negedge clk); c++; end
    r = 256'(rlp - rln);
    if (c > maxc_l) maxc_l = c;
    checks++;
    if (r >= P256 || 256'((512'(r) * 512'(b)) % 512'(P256)) != a) begin
      failures++;
      if (failures < 10) $display("FAIL256 got %h", r);
    end
    checks++;
    if (c > 4 * 256 + 3) begin failures++; $display("FAIL256 cycles %0d", c); end
  endtask

  initial begin
    ss = 0; sl = 0; as_ = 0; bs_ = 0; ms = 3; al = 0; bl_ = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    run_small(16'd5, 16'd0, 16'd65521);
    run_small(16'd1, 16'd1, 16'd65521);
    run_small(16'd0, 16'd7, 16'd65521);
    for (int t = 0; t < 600; t++) begin
      logic [WS-1:0] m, a, b;
      m = (t % 2) ? 16'd65521 : 16'd40961;
      a = WS'($urandom % m);
      b = WS'(1 + $urandom % (m - 1));
      run_small(a, b, m);
    end
    run_large(256'd1, P256 - 256'd1);
    for (int t = 0; t < 30; t++) begin
      logic [255:0] a, b;
      a = rnd256() % P256;
      b = rnd256() % P256;
      if (b == 0) b = 1;
      run_large(a, b);
    end
    $display("max cycles: 16-bit %0d, 256-bit %0d", maxc_s, maxc_l);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
