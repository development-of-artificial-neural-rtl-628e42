// mux_0: operand selector in front of the floating-point multiplier.
//
// It hands the multiplier two operands: the data operand chosen by SEL and
// the weight currently read from the ROM. The data sources carry the
// numbers printed at the multiplexer's inputs: 0 = network input 0,
// 1 = network input 1, 4..7 = REG_0 entries 2..5 (F, G, H, I), 8..9 =
// REG_1 entries 3..4 (J, K, the hidden-neuron outputs). Select codes with no
// source (2, 3, 10..15) give zero. Purely combinational.
module mux_0
  import fp17_pkg::*;
(
  input  mux0_sel_e sel,
  input  fp17_t     in0,
  input  fp17_t     in1,
  input  fp17_t     reg0_q [NREG],
  input  fp17_t     reg1_q [NREG],
  input  fp17_t     rom_data,
  output fp17_t     data_out,
  output fp17_t     weight_out
);

  always_comb begin
    unique case (sel)
      M0_IN0:  data_out = in0;
      M0_IN1:  data_out = in1;
      M0_F:    data_out = reg0_q[2];
      M0_G:    data_out = reg0_q[3];
      M0_H:    data_out = reg0_q[4];
      M0_I:    data_out = reg0_q[5];
      M0_J:    data_out = reg1_q[3];
      M0_K:    data_out = reg1_q[4];
      default: data_out = FP_ZERO;
    endcase
    weight_out = rom_data;
  end

endmodule
