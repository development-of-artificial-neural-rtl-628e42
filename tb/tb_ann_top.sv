// tb_ann_top: end-to-end test of the 2-2-1 network at its default size.
//
// For each pair of inputs the expected output is computed independently in
// double precision, truncating every product, sum and series step to the
// 17-bit format exactly where the hardware rounds:
//   out = sig(W4*sig(W0*in0 + W1*in1) + W5*sig(W2*in0 + W3*in1))
// with the default ROM weights 0.5, -0.25, 0.75, 1.5, 1.25, -2.0. The test
// checks OUT, the EXCEPTION flag and the run length in cycles
// (43 + the three activation latencies, 32 or 1 each). It counts how often
// each mechanism of the datapath happened and fails if one never did:
// activation through the series, clamped and short-cut; exact
// cancellation in the adder; an overflow exception; a START ignored while
// busy. Runs are started back to back and with idle gaps.
module tb_ann_top;
  import fp17_pkg::*;
  import fp17_ref_pkg::*;

  logic  clk = 0, rst = 1, start = 0;
  fp17_t in0 = '0, in1 = '0, out;
  logic  busy, done, exception;

  ann_top dut (.clk, .rst, .start, .in0, .in1, .busy, .done, .exception, .out);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_series = 0, n_clamp = 0, n_short = 0, n_cancel = 0, n_exc = 0, n_ignored = 0;
  real W [6] = '{0.5, -0.25, 0.75, 1.5, 1.25, -2.0};

  function automatic logic [16:0] rmul(logic [16:0] a, real w, inout bit exc);
    bit o; logic [16:0] r;
    r = from_real(to_real(a) * w, o);
    exc |= o;
    return r;
  endfunction

  function automatic logic [16:0] radd(logic [16:0] a, logic [16:0] b, inout bit exc,
                                       inout int cancel);
    bit o; logic [16:0] r;
    r = from_real(ref_sum(a, b), o);
    exc |= o;
    if (a[15:10] != 0 && a[15:0] == b[15:0] && a[16] != b[16]) cancel++;
    return r;
  endfunction

  function automatic logic [16:0] ract(logic [16:0] x, inout int lat);
    bit s, c; logic [16:0] r;
    r = ref_sig(x, s, c);
    lat += s ? 1 : 32;
    if (s) n_short++; else if (c) n_clamp++; else n_series++;
    return r;
  endfunction

  task automatic run(logic [16:0] a, logic [16:0] b, bit poke_busy);
    logic [16:0] p0, p1, p2, p3, c, d, j, k, p4, p5, e, want;
    bit exc; int lat, cycles, cancel;
    exc = 0; lat = 43; cancel = 0;
    p0 = rmul(a, W[0], exc); p1 = rmul(b, W[1], exc);
    p2 = rmul(a, W[2], exc); p3 = rmul(b, W[3], exc);
    c = radd(p0, p1, exc, cancel); d = radd(p2, p3, exc, cancel);
    j = ract(c, lat); k = ract(d, lat);
    p4 = rmul(j, W[4], exc); p5 = rmul(k, W[5], exc);
    e = radd(p4, p5, exc, cancel);
    want = ract(e, lat);
    n_cancel += cancel;

    in0 <= a; in1 <= b; start <= 1;
    @(posedge clk);
    start <= 0;
    cycles = 0;
    do begin
      @(posedge clk); cycles++;
      if (poke_busy && cycles == 20) begin
        // a START while busy must be ignored
        in0 <= 17'h1ffff; start <= 1;
        @(posedge clk); cycles++;
        start <= 0; in0 <= a;
        if (!done && busy) n_ignored++;
      end
    end while (!done && cycles < 1000);
    checks++;
    if (out !== want || exception !== exc || cycles != lat) begin
      failures++;
      $display("FAIL: in %h %h: out %h want %h, exc %0d want %0d, %0d cycles want %0d",
               a, b, out, want, exception, exc, cycles, lat);
    end
    if (exc) n_exc++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    run(17'h07C00, 17'h07C00, 0);              // in0 = 1, in1 = 1
    run(17'h07C00, 17'h08000, 1);              // in1 = 2*in0: hidden-1 sum cancels
    run(17'h07C00, 17'h0FFFF, 0);              // in1 near 2^33: in1 * 1.5 overflows
    run(17'h09000, 17'h19000, 0);              // large inputs: short-cut activations
    run(17'h08000, 17'h17800, 0);              // clamped activation
    for (int i = 0; i < 200; i++) begin
      run(rand_fp(i < 150 ? 3 : 8), rand_fp(i < 150 ? 3 : 8), i == 7);
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    $display("mechanisms: series %0d clamped %0d short-cut %0d cancellation %0d exception %0d ignored-start %0d",
             n_series, n_clamp, n_short, n_cancel, n_exc, n_ignored);
    checks++;
    if (n_series == 0 || n_clamp == 0 || n_short == 0 || n_cancel == 0 || n_exc == 0 ||
        n_ignored == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
