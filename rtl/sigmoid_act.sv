// sigmoid_act: digital sigmoid activation, evaluated as a Taylor series.
//
// y = 1/(1+exp(-x)) is approximated by its Taylor series about 0, kept to
// the fifth-order term and evaluated in Horner form with one floating-point
// multiplier and one floating-point adder:
//     y = 1/2 + x * (1/4 + x^2 * (-1/48 + x^2 * 1/480))
// The seven operations (x^2, four more multiplications or additions in the
// bracket, the final * x and + 1/2) run one after another; each waits for
// DONE of its unit. The polynomial rises monotonically and crosses 1 near
// x = 2.49 and 0 near x = -2.49, so the result is clamped into [0, 1]; for
// |x| >= 4 the series is skipped and 0 or 1 is returned at once, which also
// keeps x^5 inside the exponent range.
//
// Interface: START (one cycle) samples X; DONE pulses with Y valid and Y
// holds until the next result. BUSY is high in between. Latency from START
// to DONE: 32 cycles through the series (4 multiplications of 3+1 cycles,
// 3 additions of 4+1 cycles, 1 to clamp), 1 cycle when saturated. SATURATED
// tells, with DONE, that the result was clamped or short-cut.
// The series form is the design's; the truncation after the x^5 term, the
// clamp and the |x| >= 4 short-cut are this design's choices.
module sigmoid_act
  import fp17_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  fp17_t x,
  output logic  busy,
  output logic  done,
  output logic  saturated,
  output logic  exception,
  output fp17_t y
);

  // series constants, fraction truncated
  localparam fp17_t C_1_480  = 17'h05844;   //  1/480 = 2^-9 * 1.0664
  localparam fp17_t C_M1_48  = 17'h16555;   // -1/48  = -2^-6 * 1.3330
  localparam fp17_t C_1_4    = 17'h07400;   //  1/4
  localparam fp17_t C_1_2    = 17'h07800;   //  1/2
  localparam logic [EXP_W-1:0] EXP_SAT = EXP_W'(BIAS + 2);   // |x| >= 4

  typedef enum logic [2:0] {
    OP_X2,      // x2 = x * x
    OP_M5,      // t  = x2 * 1/480
    OP_A3,      // t  = t + (-1/48)
    OP_M3,      // t  = t * x2
    OP_A1,      // t  = t + 1/4
    OP_M1,      // t  = t * x
    OP_A0       // t  = t + 1/2
  } op_e;

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;

  state_e state;
  op_e    op;
  fp17_t  xr, x2, t;
  logic   is_add;
  fp17_t  opa, opb;

  logic  mul_done, mul_exc, add_done, add_exc;
  fp17_t mul_res, add_res;

  always_comb begin
    is_add = (op == OP_A3) || (op == OP_A1) || (op == OP_A0);
    unique case (op)
      OP_X2:   begin opa = xr; opb = xr;      end
      OP_M5:   begin opa = x2; opb = C_1_480; end
      OP_A3:   begin opa = t;  opb = C_M1_48; end
      OP_M3:   begin opa = t;  opb = x2;      end
      OP_A1:   begin opa = t;  opb = C_1_4;   end
      OP_M1:   begin opa = t;  opb = xr;      end
      OP_A0:   begin opa = t;  opb = C_1_2;   end
      default: begin opa = t;  opb = t;       end
    endcase
  end

  fp_mul u_mul (.clk, .rst, .ready(state == S_ISSUE && !is_add), .exception_in(1'b0),
                .op1(opa), .op2(opb), .done(mul_done), .exception_out(mul_exc),
                .result(mul_res));

  fp_add u_add (.clk, .rst, .ready(state == S_ISSUE && is_add), .exception_in(1'b0),
                .op1(opa), .op2(opb), .done(add_done), .exception_out(add_exc),
                .result(add_res));

  logic  unit_done;
  fp17_t unit_res;
  assign unit_done = is_add ? add_done : mul_done;
  assign unit_res  = is_add ? add_res  : mul_res;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      op        <= OP_X2;
      done      <= 1'b0;
      saturated <= 1'b0;
      exception <= 1'b0;
      y         <= FP_ZERO;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          xr        <= x;
          op        <= OP_X2;
          exception <= 1'b0;
          if (x.exp >= EXP_SAT) begin
            y         <= x.sign ? FP_ZERO : FP_ONE;
            saturated <= 1'b1;
            done      <= 1'b1;
          end else begin
            state <= S_ISSUE;
          end
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: if (unit_done) begin
          exception <= exception | (is_add ? add_exc : mul_exc);
          if (op == OP_X2) x2 <= unit_res;
          else             t  <= unit_res;
          if (op == OP_A0) begin
            state <= S_IDLE;
            done  <= 1'b1;
            if (unit_res.sign && unit_res.exp != '0) begin
              y <= FP_ZERO; saturated <= 1'b1;
            end else if (!unit_res.sign && unit_res.exp >= EXP_W'(BIAS)) begin
              y <= FP_ONE;  saturated <= 1'b1;
            end else begin
              y <= unit_res; saturated <= 1'b0;
            end
          end else begin
            op    <= op_e'(op + 3'd1);
            state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
