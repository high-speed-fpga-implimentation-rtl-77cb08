// div_rsd: modular divider, r = a / b mod m, by the binary GCD method.
//
// The divider runs the binary extended-GCD iteration on u = b and v = m while
// keeping x1 = a and x2 = 0 such that x1*b = a*u and x2*b = a*v (mod m). One
// step per clock cycle:
//   u even:           u = u/2,  x1 = x1/2 mod m
//   else v even:      v = v/2,  x2 = x2/2 mod m
//   else u >= v:      u = u-v,  x1 = x1-x2 mod m
//   else:             v = v-u,  x2 = x2-x1 mod m
// until u = 1 (result x1) or v = 1 (result x2). x1 and x2 are RSD numbers
// kept in (-m, m). Halving tests only the least significant digit: an odd x
// gets m added first, then the digits shift right by one. Subtraction uses
// three carry-free RSD adders: t1 = xa - xb, t2 = t1 - m and t3 = t1 + m
// (the third adder also forms x + m for halving), and picks t2 when t2 >= 0,
// t3 when t3 <= 0, else t1, by sign detection of the leading nonzero digit.
// u and v stay in binary and use one W-bit comparator/subtractor.
// A final cycle adds m to a negative result.
// Interface: start (one cycle) with a, b, m valid, m odd and b invertible
// mod m; done pulses for one cycle with r_p - r_n = a/b mod m, a W-digit RSD
// number. Latency: at most about 4*W + 3 cycles, data dependent. b = 0 ends
// at once with result 0. Reset is synchronous, active high.
// The binary GCD method with three adders, shifting and single-digit checks
// follows the source; the step schedule, the binary u/v path and the
// end-of-loop correction are this design's choices.
module div_rsd #(
  parameter int unsigned W = 256
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] m,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] r_p,
  output logic [W-1:0] r_n
);

  localparam int unsigned N = W + 3;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FIN} state_e;
  state_e state;

  logic [W-1:0] u, v, mr;
  logic [N-1:0] x1p, x1n, x2p, x2n;

  // step decode
  logic u_one, v_one, u_zero, u_even, v_even, u_ge_v;
  logic [W:0] uv_diff;
  always_comb begin
    u_one   = (u == W'(1));
    v_one   = (v == W'(1));
    u_zero  = (u == '0);
    u_even  = ~u[0];
    v_even  = ~v[0];
    uv_diff = {1'b0, u} - {1'b0, v};
    u_ge_v  = ~uv_diff[W];
  end

  // operand selection: xa is the number being updated, xb the other one
  logic sel2;                 // 1: the step updates x2
  logic do_sub;               // 1: subtract step, 0: halving step
  always_comb begin
    sel2   = 1'b0;
    do_sub = 1'b0;
    if (u_even)      begin sel2 = 1'b0; do_sub = 1'b0; end
    else if (v_even) begin sel2 = 1'b1; do_sub = 1'b0; end
    else if (u_ge_v) begin sel2 = 1'b0; do_sub = 1'b1; end
    else             begin sel2 = 1'b1; do_sub = 1'b1; end
  end

  logic [N-1:0] xap, xan, xbp, xbn, nxbp, nxbn;
  always_comb begin
    xap = sel2 ? x2p : x1p;
    xan = sel2 ? x2n : x1n;
    xbp = sel2 ? x1p : x2p;
    xbn = sel2 ? x1n : x2n;
    if (state == S_FIN) begin
      // the final correction works on the result register x1
      xap = x1p;
      xan = x1n;
    end
  end

  logic [N-1:0] mp, mn_p, mn_n;
  always_comb mp = N'(mr);
  rsd_inverter #(.N(N)) u_minv (.inv(1'b1), .x_p(mp), .x_n('0), .y_p(mn_p), .y_n(mn_n));
  rsd_inverter #(.N(N)) u_binv (.inv(1'b1), .x_p(xbp), .x_n(xbn), .y_p(nxbp), .y_n(nxbn));

  // adder 1: t1 = xa - xb
  logic [N-1:0] t1p, t1n;
  rsd_add #(.N(N), .FOLD(1'b1)) u_add1 (
    .x_p(xap), .x_n(xan), .y_p(nxbp), .y_n(nxbn), .s_p(t1p), .s_n(t1n));

  // adder 2: t2 = t1 - m
  logic [N-1:0] t2p, t2n;
  rsd_add #(.N(N), .FOLD(1'b1)) u_add2 (
    .x_p(t1p), .x_n(t1n), .y_p(mn_p), .y_n(mn_n), .s_p(t2p), .s_n(t2n));

  // adder 3: t3 = t1 + m on a subtract step, xa + m otherwise
  logic [N-1:0] a3p, a3n, t3p, t3n;
  always_comb begin
    a3p = do_sub && state == S_RUN ? t1p : xap;
    a3n = do_sub && state == S_RUN ? t1n : xan;
  end
  rsd_add #(.N(N), .FOLD(1'b1)) u_add3 (
    .x_p(a3p), .x_n(a3n), .y_p(mp), .y_n('0), .s_p(t3p), .s_n(t3n));

  logic t2_neg, t2_zero, t3_neg, t3_zero, xa_neg, xa_zero;
  rsd_sign #(.N(N)) u_sg2 (.x_p(t2p), .x_n(t2n), .neg(t2_neg), .zero(t2_zero));
  rsd_sign #(.N(N)) u_sg3 (.x_p(t3p), .x_n(t3n), .neg(t3_neg), .zero(t3_zero));
  rsd_sign #(.N(N)) u_sga (.x_p(xap), .x_n(xan), .neg(xa_neg), .zero(xa_zero));

  // new value of xa
  logic [N-1:0] nxp, nxn;
  always_comb begin
    if (do_sub) begin
      if (!t2_neg)                 begin nxp = t2p; nxn = t2n; end
      else if (t3_neg || t3_zero)  begin nxp = t3p; nxn = t3n; end
      else                         begin nxp = t1p; nxn = t1n; end
    end else begin
      if (xap[0] ^ xan[0]) begin   // odd: (x + m) / 2
        nxp = {1'b0, t3p[N-1:1]};
        nxn = {1'b0, t3n[N-1:1]};
      end else begin               // even: x / 2
        nxp = {1'b0, xap[N-1:1]};
        nxn = {1'b0, xan[N-1:1]};
      end
    end
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      state <= S_IDLE;
      u <= '0; v <= '0; mr <= '0;
      x1p <= '0; x1n <= '0; x2p <= '0; x2n <= '0;
      r_p <= '0; r_n <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          u <= b; v <= m; mr <= m;
          x1p <= N'(a); x1n <= '0;
          x2p <= '0;    x2n <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          if (u_zero) begin
            x1p <= '0; x1n <= '0;
            state <= S_FIN;
          end else if (u_one) begin
            state <= S_FIN;
          end else if (v_one) begin
            x1p <= x2p; x1n <= x2n;
            state <= S_FIN;
          end else begin
            if (do_sub) begin
              if (sel2) v <= v - u;
              else      u <= W'(uv_diff);
            end else begin
              if (sel2) v <= v >> 1;
              else      u <= u >> 1;
            end
            if (sel2) begin x2p <= nxp; x2n <= nxn; end
            else      begin x1p <= nxp; x1n <= nxn; end
          end
        end
        S_FIN: begin
          if (xa_neg) begin
            r_p <= t3p[W-1:0];
            r_n <= t3n[W-1:0];
          end else begin
            r_p <= x1p[W-1:0];
            r_n <= x1n[W-1:0];
          end
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
