// tb_karatsuba_mul: streams random operand pairs, one per cycle, into a
// 64-bit Karatsuba multiplier (8-bit leaves, four pipeline levels) and
// checks every RSD product against the binary product exactly klat(64, 8)
// cycles later. Operands with all-ones halves exercise the carry
// correction terms of the middle product.
module tb_karatsuba_mul;
  localparam int W = 64, LEAF = 8;
  localparam int LAT = ecc_pkg::klat(W, LEAF);
  logic clk = 0;
  logic [W-1:0] a, b;
  logic [2*W+1:0] pp, pn;
  logic [2*W-1:0] expq [$];
  int checks = 0, failures = 0, cycle = 0;

  karatsuba_mul #(.W(W), .LEAF(LEAF)) dut (.clk(clk), .a(a), .b(b), .p_p(pp), .p_n(pn));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    if (LAT != 4) begin failures++; $display("FAIL latency constant %0d", LAT); end
    a = '0; b = '0;
    for (int t = 0; t < 3000 + LAT; t++) begin
      @(negedge clk);
      if (t >= LAT) begin
        logic [2*W-1:0] e;
        e = expq.pop_front();
        checks++;
        if ((2*W+2)'(pp - pn) !== (2*W+2)'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d got %h exp %h", t, (2*W)'(pp - pn), e);
        end
      end
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      if (t % 5 == 0) a = '1;
      if (t % 7 == 0) b = '1;
      if (t % 11 == 0) a[W-1:W/2] = '1;
      expq.push_back((2*W)'(a) * (2*W)'(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
