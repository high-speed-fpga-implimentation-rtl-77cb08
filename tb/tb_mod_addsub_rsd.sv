// tb_mod_addsub_rsd: checks modular addition and subtraction at 16 bits with
// random moduli and at 256 bits with the P-256 prime, against (x +/- y) mod m
// computed in binary. Counts how often each of the three outcomes (no
// correction, subtract m, add m) was exercised.
module tb_mod_addsub_rsd;
  import ecc_pkg::*;
  localparam int WS = 16;
  logic sub;
  logic [WS-1:0] xs, ys, ms, rsp, rsn;
  logic [255:0] xl, yl, rlp, rln;
  int checks = 0, failures = 0;
  int n_plain = 0, n_minus = 0, n_plus = 0;

  mod_addsub_rsd #(.W(WS)) dut_s (.sub(sub), .x(xs), .y(ys), .m(ms), .r_p(rsp), .r_n(rsn));
  mod_addsub_rsd dut_l (.sub(sub), .x(xl), .y(yl), .m(P256), .r_p(rlp), .r_n(rln));

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      longint e;
      logic [256:0] el;
      sub = 1'($urandom);
      ms = WS'($urandom);
      if (ms < 2) ms = 2;
      if (t % 10 == 0) ms = '1;
      xs = WS'($urandom % ms); ys = WS'($urandom % ms);
      xl = rnd256() % P256; yl = rnd256() % P256;
      if (t % 9 == 0) xl = P256 - 256'd1;
      #1;
      e = sub ? longint'(xs) - longint'(ys) : longint'(xs) + longint'(ys);
      if (e < 0) n_plus++; else if (e >= longint'(ms)) n_minus++; else n_plain++;
      if (e < 0) e += longint'(ms); else if (e >= longint'(ms)) e -= longint'(ms);
      checks++;
      if (WS'(rsp - rsn) !== WS'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL16 sub=%0d %0d %0d m=%0d got %0d", sub, xs, ys, ms, WS'(rsp - rsn));
      end
      el = sub ? ({1'b0, xl} + 257'(P256) - {1'b0, yl}) : ({1'b0, xl} + {1'b0, yl});
      if (el >= 257'(P256)) el = el - 257'(P256);
      checks++;
      if (256'(rlp - rln) !== 256'(el)) begin
        failures++;
        if (failures < 10) $display("FAIL256 sub=%0d", sub);
      end
    end
    $display("outcomes: plain=%0d minus_m=%0d plus_m=%0d", n_plain, n_minus, n_plus);
    if (n_plain == 0 || n_minus == 0 || n_plus == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
