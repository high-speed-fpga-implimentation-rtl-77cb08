// tb_ecc_memory: writes random RSD words to every address and reads them
// back through all three asynchronous read ports, against a shadow copy.
module tb_ecc_memory;
  localparam int W = 16, DEPTH = 8;
  logic clk = 0;
  logic we;
  logic [2:0] waddr, ra0, ra1, ra2;
  logic [W-1:0] wp, wn, r0p, r0n, r1p, r1n, r2p, r2n;
  logic [2*W-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  ecc_memory #(.W(W), .DEPTH(DEPTH)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata_p(wp), .wdata_n(wn),
    .raddr0(ra0), .raddr1(ra1), .raddr2(ra2),
    .rdata0_p(r0p), .rdata0_n(r0n), .rdata1_p(r1p), .rdata1_n(r1n),
    .rdata2_p(r2p), .rdata2_n(r2n));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wp = 0; wn = 0; ra0 = 0; ra1 = 0; ra2 = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 3'(i); wp = W'($urandom); wn = W'($urandom);
      shadow[i] = {wp, wn};
    end
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      we = 1'($urandom);
      waddr = 3'($urandom); wp = W'($urandom); wn = W'($urandom);
      ra0 = 3'($urandom); ra1 = 3'($urandom); ra2 = 3'($urandom);
      #1;
      checks++;
      if ({r0p, r0n} !== shadow[ra0] || {r1p, r1n} !== shadow[ra1] || {r2p, r2n} !== shadow[ra2]) begin
        failures++;
        if (failures < 10) $display("FAIL read at %0d %0d %0d", ra0, ra1, ra2);
      end
      @(posedge clk);
      if (we) shadow[waddr] = {wp, wn};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
