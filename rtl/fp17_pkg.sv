// fp17_pkg: number format and shared types of the neural-network datapath.
//
// Every value in the datapath is a 17-bit floating-point word: 1 sign bit,
// a 6-bit biased exponent and a 10-bit fraction with a hidden leading one
// (the 1/6/10 split follows the design; the bias and the encoding of zero
// are this design's choice). Value = (-1)^sign * 2^(exp-31) * 1.man.
// An exponent field of 0 means zero (the fraction is ignored); there are no
// subnormals, infinities or NaNs. Results too large to encode raise the
// exception flag of the unit that produced them.
package fp17_pkg;

  localparam int unsigned EXP_W = 6;
  localparam int unsigned MAN_W = 10;
  localparam int unsigned FP_W  = 1 + EXP_W + MAN_W;       // 17
  localparam int unsigned BIAS  = (1 << (EXP_W - 1)) - 1;  // 31
  localparam int unsigned EXP_MAX = (1 << EXP_W) - 1;      // 63

  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [MAN_W-1:0] man;
  } fp17_t;

  localparam fp17_t FP_ZERO = '{sign: 1'b0, exp: '0, man: '0};
  localparam fp17_t FP_ONE  = '{sign: 1'b0, exp: EXP_W'(BIAS), man: '0};

  // Number of registers in each register bank and of weights in the ROM.
  localparam int unsigned NREG = 6;

  // Data operand sources of MUX_0 (numbers as printed at its inputs).
  typedef enum logic [3:0] {
    M0_IN0 = 4'd0, M0_IN1 = 4'd1,
    M0_F   = 4'd4, M0_G   = 4'd5, M0_H = 4'd6, M0_I = 4'd7,
    M0_J   = 4'd8, M0_K   = 4'd9
  } mux0_sel_e;

  // Operand sources of MUX_1. Input 0 is the ROM data word; the other
  // letters name register outputs: A,B,F,G,H,I are REG_0 entries 0..5,
  // C,D,E,J,K are REG_1 entries 0..4.
  typedef enum logic [3:0] {
    M1_ROM = 4'd0,
    M1_A = 4'd1, M1_B = 4'd2, M1_F = 4'd3, M1_G = 4'd4, M1_H = 4'd5, M1_I = 4'd6,
    M1_C = 4'd7, M1_D = 4'd8, M1_E = 4'd9, M1_J = 4'd10, M1_K = 4'd11
  } mux1_sel_e;

endpackage
