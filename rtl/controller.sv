// controller: finite-state machine that sequences one processor operation.
//
// On start it loads the three external operands a, b and m over the external
// and result buses into memory words 0, 1 and 2 (one per cycle), then starts
// the unit chosen by sel with memory words 0, 1, 2 on the operand bus, waits
// for that unit's done, writes its result over the result bus into word 3,
// reads word 3 back to the output register and raises done for one cycle.
// Operation codes (ecc_pkg::op_e): 0 add, 1 subtract, 2 multiply, 3 divide.
// Timing: 3 load cycles, 1 issue cycle, the unit latency L (the write-back
// happens in the cycle the unit reports done), 1 read-back cycle, then done:
// done rises 5 + L clock edges after the edge that samples start.
// start is ignored while an operation is in progress.
// Reset is synchronous, active high.
// The controller as the FSM over the arithmetic unit, memory and buses
// follows the source; the states, memory map and handshake are this
// design's choice.
module controller (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [1:0] sel,
  input  logic       add_done,
  input  logic       mul_done,
  input  logic       div_done,
  output logic       add_start,
  output logic       add_sub,
  output logic       mul_start,
  output logic       div_start,
  output logic       mem_we,
  output logic [2:0] mem_waddr,
  output logic [2:0] raddr0,
  output logic [1:0] bus_src,
  output logic [1:0] ext_sel,     // 0 a, 1 b, 2 m on the external bus
  output logic       res_load,    // capture word 3 into the output register
  output logic       done,
  output logic       busy
);

  import ecc_pkg::*;

  typedef enum logic [2:0] {C_IDLE, C_LOAD, C_ISSUE, C_WAIT, C_READ, C_DONE} cstate_e;
  cstate_e state;
  op_e     op;
  logic [1:0] cnt;
  logic    unit_done;

  always_comb begin
    unique case (op)
      OP_ADD, OP_SUB: unit_done = add_done;
      OP_MUL:         unit_done = mul_done;
      default:        unit_done = div_done;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= C_IDLE;
      op    <= OP_ADD;
      cnt   <= '0;
    end else begin
      unique case (state)
        C_IDLE: if (start) begin
          op    <= op_e'(sel);
          cnt   <= '0;
          state <= C_LOAD;
        end
        C_LOAD: begin
          cnt <= cnt + 2'd1;
          if (cnt == 2'd2) state <= C_ISSUE;
        end
        C_ISSUE: state <= C_WAIT;
        C_WAIT:  if (unit_done) state <= C_READ;
        C_READ:  state <= C_DONE;
        C_DONE:  state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

  always_comb begin
    add_start = 1'b0;
    mul_start = 1'b0;
    div_start = 1'b0;
    add_sub   = (op == OP_SUB);
    mem_we    = 1'b0;
    mem_waddr = 3'd0;
    raddr0    = 3'd0;
    bus_src   = 2'd0;
    ext_sel   = cnt;
    res_load  = 1'b0;
    unique case (state)
      C_LOAD: begin
        mem_we    = 1'b1;
        mem_waddr = {1'b0, cnt};
      end
      C_ISSUE: begin
        add_start = (op == OP_ADD) || (op == OP_SUB);
        mul_start = (op == OP_MUL);
        div_start = (op == OP_DIV);
      end
      C_WAIT: begin
        mem_we    = unit_done;
        mem_waddr = 3'd3;
        unique case (op)
          OP_ADD, OP_SUB: bus_src = 2'd1;
          OP_MUL:         bus_src = 2'd2;
          default:        bus_src = 2'd3;
        endcase
      end
      C_READ: begin
        raddr0   = 3'd3;
        res_load = 1'b1;
      end
      default: ;
    endcase
  end

  assign done = (state == C_DONE);
  assign busy = (state != C_IDLE);

endmodule
