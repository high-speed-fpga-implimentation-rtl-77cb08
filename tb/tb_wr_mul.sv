// tb_wr_mul: streams random P-256 field elements, given as RSD words with
// random redundant encodings, into the multiplication unit on consecutive
// cycles and checks each result against (x*y) mod p and its done pulse at
// exactly 9 cycles after start.
module tb_wr_mul;
  import ecc_pkg::*;
  localparam int LAT = 9;
  logic clk = 0, rst = 1, start, done;
  logic [255:0] xp, xn, yp, yn, rp, rn;
  logic [255:0] expq [$];
  int startq [$];
  int checks = 0, failures = 0, cycle = 0, issued = 0;

  wr_mul dut (.clk(clk), .rst(rst), .start(start), .x_p(xp), .x_n(xn), .y_p(yp), .y_n(yn),
              .done(done), .r_p(rp), .r_n(rn));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result checker
  always @(negedge clk) if (!rst && done) begin
    logic [255:0] e;
    int s;
    e = expq.pop_front();
    s = startq.pop_front();
    checks++;
    if (256'(rp - rn) !== e) begin
      failures++;
      if (failures < 10) $display("FAIL got %h exp %h", 256'(rp - rn), e);
    end
    checks++;
    if (cycle - s != LAT) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d", cycle - s);
    end
  end

  initial begin
    start = 0; xp = 0; xn = 0; yp = 0; yn = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 600; t++) begin
      logic [255:0] x, y, k;
      @(negedge clk);
      start = (t % 13 != 5);
      x = rnd256() % P256; y = rnd256() % P256;
      if (t % 17 == 0) begin x = P256 - 256'd1; y = P256 - 256'd1; end
      // redundant encoding: x = (x + k) - k
      k = rnd256() >> 2;
      xp = x + k; xn = k;
      yp = y; yn = '0;
      if (start) begin
        expq.push_back(256'((512'(x) * 512'(y)) % 512'(P256)));
        startq.push_back(cycle);
        issued++;
      end
    end
    @(negedge clk);
    start = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
