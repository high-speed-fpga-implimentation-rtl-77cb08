// tb_processor_design: end-to-end test of the processor at its full size
// (256-digit words, P-256 prime). Runs a mix of all four operations through
// the external ports, checks each result against a wide-integer reference
// and the start-to-done cycle count (6 + unit latency, counted in cycles
// from the one in which start is raised; unit latency add/sub 2, mul 9,
// div at most 4*256 + 4), and counts how often each mechanism occurred:
// addition with and without the subtract-m correction, subtraction with and
// without the add-m correction, multiplication with P-256 reduction,
// division, operations over a modulus other than P-256, and a start pulse
// ignored during a busy operation. A mechanism that never occurred counts
// as a failure.
module tb_processor_design;
  import ecc_pkg::*;
  logic clk = 0, reset = 1, start, done;
  logic [255:0] a, b, m, result;
  logic [1:0] sel;
  int checks = 0, failures = 0;
  int n_add_plain = 0, n_add_wrap = 0, n_sub_plain = 0, n_sub_wrap = 0;
  int n_mul = 0, n_div = 0, n_other_mod = 0, n_ignored_start = 0;

  processor_design dut (.clk(clk), .reset(reset), .start(start), .a(a), .b(b), .m(m),
                        .sel(sel), .result(result), .done(done));

  always #5 clk = ~clk;

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [1:0] op, input logic [255:0] x, input logic [255:0] y,
                     input logic [255:0] mod, input bit poke);
    logic [256:0] e;
    int c, lim;
    case (op)
      2'd0: begin
        e = {1'b0, x} + {1'b0, y};
        if (e >= 257'(mod)) begin e = e - 257'(mod); n_add_wrap++; end else n_add_plain++;
      end
      2'd1: begin
        if (x >= y) begin e = 257'(x - y); n_sub_plain++; end
        else begin e = 257'(x) + 257'(mod) - 257'(y); n_sub_wrap++; end
      end
      2'd2: begin e = 257'((512'(x) * 512'(y)) % 512'(P256)); n_mul++; end
      default: n_div++;
    endcase
    if (mod != P256) n_other_mod++;
    @(negedge clk);
    a = x; b = y; m = mod; sel = op; start = 1;
    @(negedge clk);
    start = 0;
    c = 1;
    lim = (op == 2'd3) ? 4 * 256 + 4 + 6 : ((op == 2'd2) ? 15 : 8);
    while (!done && c < lim + 50) begin
      @(negedge clk);
      c++;
      if (poke && c == 4) begin start = 1; sel = 2'($urandom); n_ignored_start++; end
      else start = 0;
    end
    checks++;
    if (op == 2'd3) begin
      if (result >= mod || 256'((512'(result) * 512'(y)) % 512'(mod)) != x) begin
        failures++;
        if (failures < 10) $display("FAIL div %h / %h got %h", x, y, result);
      end
    end else if (257'(result) !== e) begin
      failures++;
      if (failures < 10) $display("FAIL op=%0d got %h exp %h", op, result, e);
    end
    checks++;
    if ((op == 2'd3) ? (c > lim) : (c != lim)) begin
      failures++;
      if (failures < 10) $display("FAIL op=%0d cycles %0d", op, c);
    end
    @(negedge clk);
  endtask

  initial begin
    logic [255:0] m2;
    start = 0; a = 0; b = 0; m = P256; sel = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    // a second odd modulus: a 255-bit odd number (need not be prime for +, -)
    m2 = rnd256() | 256'd1;
    m2[255] = 1'b0;
    for (int t = 0; t < 40; t++) begin
      logic [1:0] op;
      logic [255:0] x, y;
      op = 2'(t % 4);
      x = rnd256() % P256;
      y = rnd256() % P256;
      if (op == 2'd3 && y == 0) y = 1;
      if (t % 8 == 1) y = P256 - 256'd1;
      run(op, x, y, P256, t % 6 == 0);
    end
    // add and subtract over a different modulus
    for (int t = 0; t < 8; t++)
      run(2'(t % 2), rnd256() % m2, rnd256() % m2, m2, 1'b0);
    // division over the 255-bit Mersenne-like odd modulus 2^255 - 19 (prime)
    run(2'd3, 256'd12345, 256'd678, (256'd1 << 255) - 256'd19, 1'b0);
    $display("mechanisms: add=%0d add_wrap=%0d sub=%0d sub_wrap=%0d mul=%0d div=%0d other_mod=%0d ignored_start=%0d",
             n_add_plain, n_add_wrap, n_sub_plain, n_sub_wrap, n_mul, n_div, n_other_mod, n_ignored_start);
    if (n_add_plain == 0) failures++;
    if (n_add_wrap == 0) failures++;
    if (n_sub_plain == 0) failures++;
    if (n_sub_wrap == 0) failures++;
    if (n_mul == 0) failures++;
    if (n_div == 0) failures++;
    if (n_other_mod == 0) failures++;
    if (n_ignored_start == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
