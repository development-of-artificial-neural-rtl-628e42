// control_unit: state machine that sequences the 2-2-1 network.
//
// One shared multiplier, one shared adder and one activation unit compute
// the whole network, so the control unit walks through a fixed program of
// twelve steps. Each step is one operation: a multiplication (MUX_0 data
// source and ROM address, result into a REG_0 entry), an addition (two
// MUX_1 sources, result into a REG_1 entry) or an activation (MUX_1 output
// A into the sigmoid unit, result into a REG_1 entry):
//    0  A = in0 * W0      1  B = in1 * W1      2  F = in0 * W2
//    3  G = in1 * W3      4  C = A + B         5  D = F + G
//    6  J = sig(C)        7  K = sig(D)        8  H = J * W4
//    9  I = K * W5       10  E = H + I        11  L = sig(E)  (= OUT)
// The letters are the register outputs of the datapath: REG_0 entries
// 0..5 are A, B, F, G, H, I; REG_1 entries 0..5 are C, D, E, J, K, L.
// For every step the FSM spends one cycle in ISSUE, pulsing the unit's
// READY (or START), then waits in WAIT for the unit's DONE; in that cycle it
// raises the destination register's enable, so the result is stored at
// the clock edge that ends the step, and the next step can read it. The
// selects stay stable from ISSUE to the end of WAIT. DONE pulses one cycle
// after the final write. A step costs 4 cycles for a multiplication, 5 for
// an addition and 1 + the activation latency for an activation.
// Which weight pairs with which input and the exact order of the steps are
// this design's reading of the datapath; START/DONE are its own handshake.
module control_unit
  import fp17_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic            mul_done,
  input  logic            add_done,
  input  logic            act_done,
  output logic [2:0]      rom_addr,
  output mux0_sel_e       mux0_sel,
  output mux1_sel_e       mux1_sel_a,
  output mux1_sel_e       mux1_sel_b,
  output logic            mul_ready,
  output logic            add_ready,
  output logic            act_start,
  output logic [NREG-1:0] reg0_en,
  output logic [NREG-1:0] reg1_en,
  output logic            reg1_from_act,   // REG_1 input: 1 = activation, 0 = adder
  output logic            busy,
  output logic            done
);

  typedef enum logic [1:0] {OP_MUL, OP_ADD, OP_ACT} op_e;

  typedef struct packed {
    op_e       op;
    mux0_sel_e m0;
    logic [2:0] addr;
    mux1_sel_e a;
    mux1_sel_e b;
    logic [2:0] dst;
  } step_t;

  localparam int unsigned NSTEP = 12;

  function automatic step_t program_step(logic [3:0] i);
    unique case (i)
      4'd0:    return '{OP_MUL, M0_IN0, 3'd0, M1_ROM, M1_ROM, 3'd0};  // A
      4'd1:    return '{OP_MUL, M0_IN1, 3'd1, M1_ROM, M1_ROM, 3'd1};  // B
      4'd2:    return '{OP_MUL, M0_IN0, 3'd2, M1_ROM, M1_ROM, 3'd2};  // F
      4'd3:    return '{OP_MUL, M0_IN1, 3'd3, M1_ROM, M1_ROM, 3'd3};  // G
      4'd4:    return '{OP_ADD, M0_IN0, 3'd0, M1_A,   M1_B,   3'd0};  // C
      4'd5:    return '{OP_ADD, M0_IN0, 3'd0, M1_F,   M1_G,   3'd1};  // D
      4'd6:    return '{OP_ACT, M0_IN0, 3'd0, M1_C,   M1_ROM, 3'd3};  // J
      4'd7:    return '{OP_ACT, M0_IN0, 3'd0, M1_D,   M1_ROM, 3'd4};  // K
      4'd8:    return '{OP_MUL, M0_J,   3'd4, M1_ROM, M1_ROM, 3'd4};  // H
      4'd9:    return '{OP_MUL, M0_K,   3'd5, M1_ROM, M1_ROM, 3'd5};  // I
      4'd10:   return '{OP_ADD, M0_IN0, 3'd0, M1_H,   M1_I,   3'd2};  // E
      default: return '{OP_ACT, M0_IN0, 3'd0, M1_E,   M1_ROM, 3'd5};  // L
    endcase
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;

  state_e     state;
  logic [3:0] idx;
  step_t      cur;
  logic       unit_done;

  assign cur        = program_step(idx);
  assign rom_addr   = cur.addr;
  assign mux0_sel   = cur.m0;
  assign mux1_sel_a = cur.a;
  assign mux1_sel_b = cur.b;
  assign busy       = (state != S_IDLE);

  always_comb begin
    unique case (cur.op)
      OP_MUL:  unit_done = mul_done;
      OP_ADD:  unit_done = add_done;
      default: unit_done = act_done;
    endcase
    mul_ready     = (state == S_ISSUE) && (cur.op == OP_MUL);
    add_ready     = (state == S_ISSUE) && (cur.op == OP_ADD);
    act_start     = (state == S_ISSUE) && (cur.op == OP_ACT);
    reg0_en       = '0;
    reg1_en       = '0;
    reg1_from_act = (cur.op == OP_ACT);
    if (state == S_WAIT && unit_done) begin
      if (cur.op == OP_MUL) reg0_en[cur.dst] = 1'b1;
      else                  reg1_en[cur.dst] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      idx   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          idx   <= '0;
          state <= S_ISSUE;
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: if (unit_done) begin
          if (idx == 4'(NSTEP - 1)) begin
            state <= S_IDLE;
            idx   <= '0;
            done  <= 1'b1;
          end else begin
            idx   <= idx + 4'd1;
            state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A unit may only report DONE while the FSM waits on it.
  property p_done_expected;
    @(posedge clk) disable iff (rst)
      (mul_done || add_done || act_done) |-> (state == S_WAIT);
  endproperty
  a_done_expected: assert property (p_done_expected);

endmodule
