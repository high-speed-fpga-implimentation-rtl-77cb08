// tb_controller: runs every operation code through the controller with a
// stand-in for the arithmetic units that answers a start with done after a
// random delay. Checks the three load writes (words 0, 1, 2 from a, b, m),
// that exactly the selected unit is started once (with the subtract flag for
// sel = 1), the write-back of the unit result to word 3 over the right bus
// source in the cycle of the unit's done, the read-back, the done pulse and
// the total cycle count, and that a start during an operation is ignored.
module tb_controller;
  logic clk = 0, rst = 1, start;
  logic [1:0] sel;
  logic add_done, mul_done, div_done;
  logic add_start, add_sub, mul_start, div_start, mem_we, res_load, done, busy;
  logic [2:0] mem_waddr, raddr0;
  logic [1:0] bus_src, ext_sel;
  int checks = 0, failures = 0;

  controller dut (.clk(clk), .rst(rst), .start(start), .sel(sel),
    .add_done(add_done), .mul_done(mul_done), .div_done(div_done),
    .add_start(add_start), .add_sub(add_sub), .mul_start(mul_start), .div_start(div_start),
    .mem_we(mem_we), .mem_waddr(mem_waddr), .raddr0(raddr0), .bus_src(bus_src),
    .ext_sel(ext_sel), .res_load(res_load), .done(done), .busy(busy));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; sel = 0; add_done = 0; mul_done = 0; div_done = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      int lat, cyc, nstarts;
      logic [1:0] s;
      s = 2'(t % 4);
      lat = 1 + $urandom % 12;
      @(negedge clk);
      sel = s; start = 1;
      @(negedge clk);
      start = 0; sel = 2'($urandom);     // sel may change after start
      // three load cycles
      for (int i = 0; i < 3; i++) begin
        check(mem_we && mem_waddr == 3'(i) && ext_sel == 2'(i) && bus_src == 2'd0, "load write");
        check(!(add_start || mul_start || div_start), "no unit start during load");
        if (i == 1) start = 1;           // ignored while busy
        @(negedge clk);
        start = 0;
      end
      // issue cycle
      check(add_start == (s == 2'd0 || s == 2'd1), "add start");
      check(mul_start == (s == 2'd2), "mul start");
      check(div_start == (s == 2'd3), "div start");
      check(!add_start || add_sub == (s == 2'd1), "subtract flag");
      check(!mem_we, "no write at issue");
      @(negedge clk);
      // wait: the unit answers after lat cycles
      nstarts = 0;
      for (int i = 1; i < lat; i++) begin
        check(!mem_we && !done, "idle while unit works");
        if (add_start || mul_start || div_start) nstarts++;
        @(negedge clk);
      end
      case (s)
        2'd0, 2'd1: add_done = 1;
        2'd2: mul_done = 1;
        default: div_done = 1;
      endcase
      // a done from another unit must not be taken
      if (s != 2'd2) mul_done = 1; else div_done = 1;
      #1;
      check(mem_we && mem_waddr == 3'd3, "write-back");
      check(bus_src == ((s == 2'd0 || s == 2'd1) ? 2'd1 : (s == 2'd2 ? 2'd2 : 2'd3)), "bus source");
      @(negedge clk);
      add_done = 0; mul_done = 0; div_done = 0;
      check(res_load && raddr0 == 3'd3 && !done, "read back");
      @(negedge clk);
      check(done, "done");
      check(nstarts == 0, "single unit start");
      @(negedge clk);
      check(!done && !busy, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
