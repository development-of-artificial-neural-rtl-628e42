// reg17: one 17-bit register built from D flip-flops.
//
// The register loads D on the rising clock edge while EN is high and holds
// its value otherwise; Q is the stored word. The register banks are built
// from six copies of it. The load enable and the synchronous, active-high
// reset to zero are this design's choices (the register banks need an
// enable per register, shown as REG_EN0..REG_EN5).
module reg17
  import fp17_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  fp17_t d,
  output fp17_t q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= FP_ZERO;
    else if (en) q <= d;
  end

endmodule
