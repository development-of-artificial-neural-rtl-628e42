// tb_single_neuron: follows one neuron through the datapath, step by step.
//
// The first hidden neuron of the network is the two-input processing
// element on its own: input 0 times the first weight goes to REG_0 entry 0,
// input 1 times the second weight to REG_0 entry 1, their sum to REG_1
// entry 0 and its sigmoid to REG_1 entry 3. This test starts the network
// with a set of input pairs and samples those four registers right after
// the clock edge that must write each of them (edges 4, 8, 21 and 27 +
// activation latency after the edge that samples START), comparing each
// with an independently computed value; REG_0 entry 0 is also checked one
// edge early, where it must still hold the previous run's value. It uses
// the network at its default size and weights.
module tb_single_neuron;
  import fp17_pkg::*;
  import fp17_ref_pkg::*;

  logic  clk = 0, rst = 1, start = 0;
  fp17_t in0 = '0, in1 = '0, out;
  logic  busy, done, exception;

  ann_top dut (.clk, .rst, .start, .in0, .in1, .busy, .done, .exception, .out);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(string what, logic [16:0] got, logic [16:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL: %s = %h, want %h", what, got, want);
    end
  endtask

  task automatic neuron(logic [16:0] a, logic [16:0] b);
    logic [16:0] p0, p1, c, j; bit o, s, cl; int lat;
    p0 = from_real(to_real(a) * 0.5, o);
    p1 = from_real(to_real(b) * -0.25, o);
    c  = from_real(ref_sum(p0, p1), o);
    j  = ref_sig(c, s, cl);
    lat = s ? 1 : 32;
    in0 <= a; in1 <= b; start <= 1;
    @(posedge clk);
    start <= 0;
    // edges counted from the one that samples START
    repeat (3) @(posedge clk); #1;
    check("REG_0[0] before its write", dut.reg0_q[0] === p0 && p0 != 17'd0 ? 17'h1 : 17'h0, 17'h0);
    @(posedge clk); #1;                       // edge 4
    check("in0*W0 in REG_0[0]", dut.reg0_q[0], p0);
    repeat (4) @(posedge clk); #1;            // edge 8
    check("in1*W1 in REG_0[1]", dut.reg0_q[1], p1);
    repeat (13) @(posedge clk); #1;           // edge 21
    check("sum in REG_1[0]", dut.reg1_q[0], c);
    repeat (6 + lat) @(posedge clk); #1;      // edge 27 + activation latency
    check("sigmoid in REG_1[3]", dut.reg1_q[3], j);
    while (!done) @(posedge clk);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    neuron(17'h07C00, 17'h17C00);   //  1, -1
    neuron(17'h07800, 17'h08000);   //  0.5, 2
    for (int i = 0; i < 30; i++) neuron(rand_fp(3), rand_fp(3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
