// weight_rom: constant store of the six network weights W0..W5.
//
// The ROM holds one 17-bit floating-point weight per address and reads it
// asynchronously: DATA follows ADDRESS within the same cycle. Addresses
// 0..5 hold W0..W5; 6 and 7 read as zero. The weights belong to the trained
// network and are given as the WEIGHTS parameter; the default set below is
// this design's own example (0.5, -0.25, 0.75, 1.5, 1.25, -2.0), since the
// trained values are not published. Address assignment: hidden neuron 1
// uses W0 (input 0) and W1 (input 1), hidden neuron 2 uses W2 and W3, the
// output neuron uses W4 and W5.
module weight_rom
  import fp17_pkg::*;
#(
  parameter fp17_t WEIGHTS [NREG] = '{
    17'h07800,   // W0 =  0.5
    17'h17400,   // W1 = -0.25
    17'h07A00,   // W2 =  0.75
    17'h07E00,   // W3 =  1.5
    17'h07D00,   // W4 =  1.25
    17'h18000    // W5 = -2.0
  }
)(
  input  logic [2:0] address,
  output fp17_t      data
);

  always_comb begin
    if (address < 3'(NREG)) data = WEIGHTS[address];
    else                    data = FP_ZERO;
  end

endmodule
