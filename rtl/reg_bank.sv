// reg_bank: a bank of six 17-bit registers (REG_0 or REG_1).
//
// REG_0 keeps the six products of the multiplier, REG_1 the sums of the
// adder and the activation results. All six registers share the data input
// D; REG_EN[i] loads register i at the rising clock edge, and several
// enables may be high together. Every register's output is brought out on
// Q[i] at once, so the multiplexers can pick any stored value in the next
// cycle. Synchronous, active-high reset clears all six.
module reg_bank
  import fp17_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [NREG-1:0] reg_en,
  input  fp17_t           d,
  output fp17_t           q [NREG]
);

  for (genvar i = 0; i < NREG; i++) begin : g_reg
    reg17 u_reg (.clk, .rst, .en(reg_en[i]), .d, .q(q[i]));
  end

endmodule
