// ann_top: a two-input, two-hidden-neuron, one-output neural network
// computed by a single floating-point neuron datapath.
//
//   out = sig(W4 * sig(W0*in0 + W1*in1) + W5 * sig(W2*in0 + W3*in1))
//
// All arithmetic is 17-bit floating point (1 sign, 6 exponent, 10 fraction
// bits). Instead of six multipliers and three adders, one pipelined
// multiplier (FP_MULT) and one pipelined adder (FP_ADD) are reused under a
// control unit:
//   ROM --> MUX_0 --> FP_MULT --> REG_0 --> MUX_1 --> FP_ADD --> REG_1 --> OUT
// MUX_0 picks a network input or a stored hidden-neuron output and pairs it
// with the ROM weight addressed by the control unit; REG_0 keeps the six
// products; MUX_1 picks two stored values for the adder; REG_1 keeps the
// three sums and, written through the sigmoid activation unit (fed from
// MUX_1's first output), the two hidden outputs and the network output.
// REG_1 entry 5 is OUT.
//
// Interface: IN0/IN1 must be held stable from START until DONE. START is
// taken when BUSY is low; DONE pulses when OUT is valid, and OUT holds until
// the next run. EXCEPTION is set if any multiplication, addition or series
// step of this run overflowed; it is cleared by START. Latency is
// 6*4 + 3*5 + 3 + the three activation latencies (32 each through the
// series, 1 when short-cut) + 1 cycles, i.e. 46 to 139 cycles.
// WEIGHTS loads the ROM; the default is an example set, not trained values.
// The datapath and the roles of the blocks follow the design; the step
// order, the REG_1 input selector and the handshake are this design's own.
module ann_top
  import fp17_pkg::*;
#(
  // the six trained weights W0..W5 (see weight_rom for the default set)
  parameter fp17_t WEIGHTS [NREG] = '{17'h07800, 17'h17400, 17'h07A00,
                                      17'h07E00, 17'h07D00, 17'h18000}
)(
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  fp17_t in0,
  input  fp17_t in1,
  output logic  busy,
  output logic  done,
  output logic  exception,
  output fp17_t out
);

  logic [2:0]      rom_addr;
  mux0_sel_e       mux0_sel;
  mux1_sel_e       mux1_sel_a, mux1_sel_b;
  logic            mul_ready, add_ready, act_start;
  logic            mul_done, add_done, act_done;
  logic            mul_exc, add_exc, act_exc, act_busy;
  logic [NREG-1:0] reg0_en, reg1_en;
  logic            reg1_from_act;

  fp17_t rom_data, mul_a, mul_b, mul_res, add_a, add_b, add_res, act_y, reg1_d;
  fp17_t reg0_q [NREG];
  fp17_t reg1_q [NREG];

  control_unit u_ctrl (
    .clk, .rst, .start, .mul_done, .add_done, .act_done,
    .rom_addr, .mux0_sel, .mux1_sel_a, .mux1_sel_b,
    .mul_ready, .add_ready, .act_start, .reg0_en, .reg1_en, .reg1_from_act,
    .busy, .done
  );

  weight_rom #(.WEIGHTS(WEIGHTS)) u_rom (.address(rom_addr), .data(rom_data));

  mux_0 u_mux0 (
    .sel(mux0_sel), .in0, .in1, .reg0_q, .reg1_q, .rom_data,
    .data_out(mul_a), .weight_out(mul_b)
  );

  fp_mul u_mul (
    .clk, .rst, .ready(mul_ready), .exception_in(1'b0), .op1(mul_a), .op2(mul_b),
    .done(mul_done), .exception_out(mul_exc), .result(mul_res)
  );

  reg_bank u_reg0 (.clk, .rst, .reg_en(reg0_en), .d(mul_res), .q(reg0_q));

  mux_1 u_mux1 (
    .sel_a(mux1_sel_a), .sel_b(mux1_sel_b), .rom_data, .reg0_q, .reg1_q,
    .op_a(add_a), .op_b(add_b)
  );

  fp_add u_add (
    .clk, .rst, .ready(add_ready), .exception_in(1'b0), .op1(add_a), .op2(add_b),
    .done(add_done), .exception_out(add_exc), .result(add_res)
  );

  sigmoid_act u_act (
    .clk, .rst, .start(act_start), .x(add_a), .busy(act_busy), .done(act_done),
    .saturated(), .exception(act_exc), .y(act_y)
  );

  assign reg1_d = reg1_from_act ? act_y : add_res;

  reg_bank u_reg1 (.clk, .rst, .reg_en(reg1_en), .d(reg1_d), .q(reg1_q));

  assign out = reg1_q[NREG-1];

  // sticky exception flag of the current run
  always_ff @(posedge clk) begin
    if (rst || (start && !busy)) exception <= 1'b0;
    else if ((mul_done && mul_exc) || (add_done && add_exc) || (act_done && act_exc))
      exception <= 1'b1;
  end

  // the activation unit is only started when idle
  a_act_idle: assert property (@(posedge clk) disable iff (rst) act_start |-> !act_busy);

endmodule
