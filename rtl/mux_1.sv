// mux_1: operand selector in front of the floating-point adder.
//
// Two independent selectors, SEL_A and SEL_B, each pick one of: the ROM
// data word (input 0), REG_0 entries A, B, F, G, H, I (0..5) or REG_1
// entries C, D, E, J, K (0..4). Output A also feeds the activation unit,
// which reads the sums C, D, E through it. Purely combinational; undefined
// select codes give zero. Only input 0 carries a printed number in the
// design; the other codes are this design's numbering (see fp17_pkg).
module mux_1
  import fp17_pkg::*;
(
  input  mux1_sel_e sel_a,
  input  mux1_sel_e sel_b,
  input  fp17_t     rom_data,
  input  fp17_t     reg0_q [NREG],
  input  fp17_t     reg1_q [NREG],
  output fp17_t     op_a,
  output fp17_t     op_b
);

  function automatic fp17_t pick(mux1_sel_e s, fp17_t rom, fp17_t r0 [NREG],
                                 fp17_t r1 [NREG]);
    unique case (s)
      M1_ROM:  return rom;
      M1_A:    return r0[0];
      M1_B:    return r0[1];
      M1_F:    return r0[2];
      M1_G:    return r0[3];
      M1_H:    return r0[4];
      M1_I:    return r0[5];
      M1_C:    return r1[0];
      M1_D:    return r1[1];
      M1_E:    return r1[2];
      M1_J:    return r1[3];
      M1_K:    return r1[4];
      default: return FP_ZERO;
    endcase
  endfunction

  assign op_a = pick(sel_a, rom_data, reg0_q, reg1_q);
  assign op_b = pick(sel_b, rom_data, reg0_q, reg1_q);

endmodule
