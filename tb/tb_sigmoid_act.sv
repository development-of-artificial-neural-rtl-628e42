// tb_sigmoid_act: checks the Taylor-series sigmoid against a reference that
// evaluates the same fifth-order polynomial in double precision, truncating
// every intermediate result to the 17-bit format, then clamps into [0, 1].
// It also checks that the result stays within 0.02 of the true sigmoid for
// |x| <= 2, that the latency is 32 cycles through the series and 1 cycle
// when |x| >= 4, and that both the clamped and the short-cut cases occur.
module tb_sigmoid_act;
  import fp17_pkg::*;
  import fp17_ref_pkg::*;

  logic  clk = 0, rst = 1, start = 0;
  fp17_t x = '0, y;
  logic  busy, done, saturated, exception;
  int checks = 0, failures = 0;
  int n_series = 0, n_clamp = 0, n_short = 0;

  sigmoid_act dut (.clk, .rst, .start, .x, .busy, .done, .saturated, .exception, .y);

  always #5 clk = ~clk;

  task automatic run_one(logic [16:0] xw);
    logic [16:0] want; bit short, clamp; int lat; real xv, err;
    want = ref_sig(xw, short, clamp);
    x <= xw; start <= 1;
    @(posedge clk);
    start <= 0; x <= '0;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!done && lat < 100);
    checks++;
    if (y !== want || lat != (short ? 1 : 32) || saturated !== (short | clamp) || exception) begin
      failures++;
      $display("FAIL: x=%h (%f) y=%h want %h lat %0d sat %0d", xw, to_real(xw), y, want, lat, saturated);
    end
    xv = to_real(xw);
    if (xv <= 2.0 && xv >= -2.0) begin
      err = to_real(y) - 1.0 / (1.0 + $exp(-xv));
      checks++;
      if (err > 0.02 || err < -0.02) begin
        failures++;
        $display("FAIL: x=%f y=%f differs from the sigmoid by %f", xv, to_real(y), err);
      end
    end
    if (short) n_short++; else if (clamp) n_clamp++; else n_series++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    run_one(17'd0);
    run_one(17'h07C00);   //  1.0
    run_one(17'h17C00);   // -1.0
    run_one(17'h08200);   //  3.0 (clamped)
    run_one(17'h08400);   //  4.0 (short-cut)
    for (int i = 0; i < 300; i++)
      run_one({1'($urandom), 6'($urandom_range(20, 34)), 10'($urandom)});
    checks++;
    if (n_series == 0 || n_clamp == 0 || n_short == 0) begin
      failures++;
      $display("FAIL: series %0d clamped %0d short-cut %0d", n_series, n_clamp, n_short);
    end
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
