// fp_mul: three-stage pipelined 17-bit floating-point multiplier.
//
// Sign, exponent and fraction are handled in parallel, as the design's
// multiplier architecture lays out:
//   stage 1  sign = s1 ^ s2, exponent sum e1 + e2 (one bit wider than an
//            exponent), 11x11-bit product of the significands 1.f1 * 1.f2,
//            and detection of a zero operand;
//   stage 2  bias removal and normalisation: the product lies in [1,4), so
//            when its top bit is set the fraction is taken one place higher
//            and the exponent gets one more; overflow and underflow are found
//            here from the widened exponent;
//   stage 3  the result register, fed by a multiplexer that forces 0 for a
//            zero operand, an underflow or an overflow.
// READY travels down the pipeline beside the data and comes out as DONE
// three clock edges later; EXCEPTION_IN travels with it and is ORed with
// the overflow flag into EXCEPTION_OUT. A new operation may start every
// cycle. The fraction is truncated (round toward zero). Forcing an
// overflowed result to 0 and flagging it, and treating underflow as a
// silent 0, are this design's choices. Reset (synchronous, active high)
// clears only the READY/DONE pipeline.
module fp_mul
  import fp17_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  ready,          // operands valid this cycle
  input  logic  exception_in,
  input  fp17_t op1,
  input  fp17_t op2,
  output logic  done,           // result valid this cycle
  output logic  exception_out,
  output fp17_t result
);

  localparam int unsigned SIG_W = MAN_W + 1;     // significand with hidden one
  localparam int unsigned PRD_W = 2 * SIG_W;     // 22-bit product

  // ---- stage 1 ----
  logic             s1_vld, s1_exc, s1_sign, s1_zero;
  logic [EXP_W:0]   s1_esum;
  logic [PRD_W-1:0] s1_prod;

  always_ff @(posedge clk) begin
    if (rst) s1_vld <= 1'b0;
    else     s1_vld <= ready;
    s1_exc  <= exception_in;
    s1_sign <= op1.sign ^ op2.sign;
    s1_zero <= (op1.exp == '0) || (op2.exp == '0);
    s1_esum <= {1'b0, op1.exp} + {1'b0, op2.exp};
    s1_prod <= {1'b1, op1.man} * {1'b1, op2.man};
  end

  // ---- stage 2 ----
  logic signed [EXP_W+2:0] e_norm;   // may be negative or above EXP_MAX
  logic [MAN_W-1:0]        m_norm;

  always_comb begin
    e_norm = $signed({2'b00, s1_esum}) - $signed((EXP_W+3)'(BIAS))
           + $signed({{(EXP_W+2){1'b0}}, s1_prod[PRD_W-1]});
    m_norm = s1_prod[PRD_W-1] ? s1_prod[PRD_W-2 -: MAN_W] : s1_prod[PRD_W-3 -: MAN_W];
  end

  logic             s2_vld, s2_exc, s2_sign, s2_zero, s2_ovf, s2_unf;
  logic [EXP_W-1:0] s2_exp;
  logic [MAN_W-1:0] s2_man;

  always_ff @(posedge clk) begin
    if (rst) s2_vld <= 1'b0;
    else     s2_vld <= s1_vld;
    s2_exc  <= s1_exc;
    s2_sign <= s1_sign;
    s2_zero <= s1_zero;
    s2_ovf  <= e_norm > $signed((EXP_W+3)'(EXP_MAX));
    s2_unf  <= e_norm < $signed((EXP_W+3)'(1));
    s2_exp  <= e_norm[EXP_W-1:0];
    s2_man  <= m_norm;
  end

  // ---- stage 3 ----
  logic force_zero, ovf_flag;
  assign ovf_flag   = s2_ovf && !s2_zero;
  assign force_zero = s2_zero || s2_unf || s2_ovf;

  always_ff @(posedge clk) begin
    if (rst) done <= 1'b0;
    else     done <= s2_vld;
    exception_out <= s2_exc || ovf_flag;
    result        <= force_zero ? FP_ZERO : fp17_t'{s2_sign, s2_exp, s2_man};
  end

endmodule
