// fp_add: four-stage pipelined 17-bit floating-point adder/subtractor.
//
// The stages follow the design's adder architecture:
//   stage 1  COMPARATOR and SWAP: the magnitudes |op1| and |op2| are
//            compared; the larger operand goes to the "large" path, the
//            other to the "small" path, and eq flags equal magnitudes;
//   stage 2  SHIFT_ADJUST: the small significand is shifted right by the
//            exponent difference so both share the large exponent; the bits
//            shifted out are kept as guard, round and sticky bits;
//   stage 3  ADD_SUB: the aligned significands are added when the signs
//            agree and subtracted (large - small) when they differ;
//   stage 4  CORRECTION: the sum is normalised (one place right after a
//            carry, or left past leading zeros), the fraction truncated and
//            the exponent adjusted. Equal magnitudes of opposite sign clear
//            the result to exact zero.
// READY travels with the data and comes out as DONE four clock edges later;
// EXCEPTION_IN travels with it and is ORed with the exponent-overflow flag.
// A new operation may start every cycle. The result carries the sign of the
// larger operand. Round toward zero, the three extra alignment bits, a 0
// result on overflow (flagged) and on underflow (silent) are this design's
// choices. Reset (synchronous, active high) clears only READY/DONE.
module fp_add
  import fp17_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  ready,
  input  logic  exception_in,
  input  fp17_t op1,
  input  fp17_t op2,
  output logic  done,
  output logic  exception_out,
  output fp17_t result
);

  localparam int unsigned SIG_W = MAN_W + 1;   // 11: hidden one + fraction
  localparam int unsigned EXT_W = SIG_W + 3;   // 14: plus guard/round/sticky
  localparam int unsigned SUM_W = EXT_W + 1;   // 15: plus carry

  // ---- stage 1: compare and swap ----
  logic  op1_larger, mag_eq;
  fp17_t large_c, small_c;

  // magnitudes, with the fraction of a zero operand (exponent 0) ignored
  logic [EXP_W+MAN_W-1:0] mag1, mag2;

  always_comb begin
    mag1       = (op1.exp == '0) ? '0 : {op1.exp, op1.man};
    mag2       = (op2.exp == '0) ? '0 : {op2.exp, op2.man};
    op1_larger = mag1 >= mag2;
    mag_eq     = mag1 == mag2;
    large_c    = op1_larger ? op1 : op2;
    small_c    = op1_larger ? op2 : op1;
  end

  logic  s1_vld, s1_exc, s1_eq;
  fp17_t s1_large, s1_small;

  always_ff @(posedge clk) begin
    if (rst) s1_vld <= 1'b0;
    else     s1_vld <= ready;
    s1_exc   <= exception_in;
    s1_eq    <= mag_eq;
    s1_large <= large_c;
    s1_small <= small_c;
  end

  // ---- stage 2: align the small operand ----
  logic [EXP_W-1:0] e_diff;
  logic [EXT_W-1:0] large_ext, small_ext, small_sh;
  logic             sticky;

  always_comb begin
    e_diff    = s1_large.exp - s1_small.exp;
    large_ext = (s1_large.exp == '0) ? '0 : {1'b1, s1_large.man, 3'b000};
    small_ext = (s1_small.exp == '0) ? '0 : {1'b1, s1_small.man, 3'b000};
    if (e_diff >= EXP_W'(EXT_W)) begin
      small_sh = '0;
      sticky   = |small_ext;
    end else begin
      small_sh = small_ext >> e_diff;
      sticky   = |(small_ext & ~({EXT_W{1'b1}} << e_diff));
    end
    small_sh[0] = small_sh[0] | sticky;
  end

  logic             s2_vld, s2_exc, s2_eq, s2_sign, s2_sub;
  logic [EXP_W-1:0] s2_exp;
  logic [EXT_W-1:0] s2_large, s2_small;

  always_ff @(posedge clk) begin
    if (rst) s2_vld <= 1'b0;
    else     s2_vld <= s1_vld;
    s2_exc   <= s1_exc;
    s2_eq    <= s1_eq;
    s2_sign  <= s1_large.sign;
    s2_sub   <= s1_large.sign ^ s1_small.sign;
    s2_exp   <= s1_large.exp;
    s2_large <= large_ext;
    s2_small <= small_sh;
  end

  // ---- stage 3: add or subtract ----
  logic             s3_vld, s3_exc, s3_clear, s3_sign;
  logic [EXP_W-1:0] s3_exp;
  logic [SUM_W-1:0] s3_sum;

  always_ff @(posedge clk) begin
    if (rst) s3_vld <= 1'b0;
    else     s3_vld <= s2_vld;
    s3_exc   <= s2_exc;
    s3_clear <= s2_eq && s2_sub;
    s3_sign  <= s2_sign;
    s3_exp   <= s2_exp;
    s3_sum   <= s2_sub ? {1'b0, s2_large} - {1'b0, s2_small}
                       : {1'b0, s2_large} + {1'b0, s2_small};
  end

  // ---- stage 4: correction (normalise, truncate, clear) ----
  logic [3:0]               lead;      // position of the leading one, 0..14
  logic                     sum_zero;
  logic [SUM_W-1:0]         norm;
  logic signed [EXP_W+1:0]  e_res;
  logic                     ovf, unf;

  always_comb begin
    lead = '0;
    for (int i = 0; i < SUM_W; i++)
      if (s3_sum[i]) lead = 4'(i);
    sum_zero = (s3_sum == '0);
    // bring the leading one to bit SUM_W-2 (the hidden-one position)
    if (lead == 4'(SUM_W-1)) norm = s3_sum >> 1;
    else                     norm = s3_sum << (4'(SUM_W-2) - lead);
    e_res = $signed({2'b00, s3_exp}) + $signed((EXP_W+2)'(lead)) - $signed((EXP_W+2)'(SUM_W-2));
    ovf   = e_res > $signed((EXP_W+2)'(EXP_MAX));
    unf   = e_res < $signed((EXP_W+2)'(1));
  end

  always_ff @(posedge clk) begin
    if (rst) done <= 1'b0;
    else     done <= s3_vld;
    exception_out <= s3_exc || (ovf && !s3_clear && !sum_zero);
    if (s3_clear || sum_zero || ovf || unf)
      result <= FP_ZERO;
    else
      result <= fp17_t'{s3_sign, e_res[EXP_W-1:0], norm[SUM_W-3 -: MAN_W]};
  end

endmodule
