// tb_modp256_rsd: feeds random and extreme 512-bit values into the P-256
// reduction, one per cycle, and checks each result against c mod p computed
// with wide integer division, two cycles later.
module tb_modp256_rsd;
  import ecc_pkg::*;
  logic clk = 0;
  logic [511:0] c;
  logic [255:0] r;
  logic [255:0] expq [$];
  int checks = 0, failures = 0;

  modp256_rsd dut (.clk(clk), .c(c), .r(r));

  always #5 clk = ~clk;

  function automatic logic [511:0] rnd512();
    logic [511:0] v;
    for (int i = 0; i < 16; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [511:0] pm1;
    pm1 = 512'(P256) - 512'd1;
    c = '0;
    for (int t = 0; t < 2002; t++) begin
      @(negedge clk);
      if (t >= 2) begin
        logic [255:0] e;
        e = expq.pop_front();
        checks++;
        if (r !== e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d got %h exp %h", t, r, e);
        end
      end
      case (t % 8)
        0: c = pm1 * pm1;
        1: c = '1;
        2: c = 512'(P256);
        3: begin c = rnd512(); c[511:256] = '0; end
        4: begin c = rnd512(); c[511:448] = '1; end
        default: c = rnd512();
      endcase
      if (t == 3) c = '0;
      expq.push_back(256'(c % 512'(P256)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
