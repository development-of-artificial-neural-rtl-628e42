// tb_fp_mul: self-checking testbench of the pipelined floating-point
// multiplier. Random operands (plus zeros and overflowing pairs) are issued
// back to back, one per cycle; each result must appear exactly three cycles
// after its READY, equal the truncated double-precision product, and carry
// the overflow exception when the product exceeds the format's range.
module tb_fp_mul;
  import fp17_pkg::*;
  import fp17_ref_pkg::*;

  localparam int N = 2000;
  localparam int LAT = 3;

  logic  clk = 0, rst = 1;
  logic  ready = 0, exc_in = 0;
  fp17_t op1 = '0, op2 = '0;
  logic  done, exc_out;
  fp17_t result;

  int checks = 0, failures = 0;
  int cycle = 0;

  fp_mul dut (.clk, .rst, .ready, .exception_in(exc_in), .op1, .op2,
              .done, .exception_out(exc_out), .result);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Expected results, queued at issue. The cycle counter is read at the
  // edge after READY is driven, and the checker reads it at the edge after
  // DONE is driven, hence the +1 below: DONE is high LAT cycles after READY.
  logic [16:0] exp_q[$];
  bit          exc_q[$];
  int          cyc_q[$];
  int          n_ovf = 0;

  always @(posedge clk) begin
    if (!rst && done) begin
      logic [16:0] e; bit x; int c;
      e = exp_q.pop_front(); x = exc_q.pop_front(); c = cyc_q.pop_front();
      checks++;
      if (result !== e || exc_out !== x || cycle != c + LAT + 1) begin
        failures++;
        if (failures < 10)
          $display("FAIL mul: got %h exc %0d at %0d, want %h exc %0d at %0d",
                   result, exc_out, cycle, e, x, c + LAT + 1);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      logic [16:0] a, b, r; bit ovf, xin;
      a = rand_fp(i < N/2 ? 8 : 31);
      b = rand_fp(i < N/2 ? 8 : 31);
      if (i % 97 == 5) begin a = {1'b0, 6'd62, 10'd100}; b = {1'b1, 6'd40, 10'd3}; end
      xin = ($urandom_range(0, 30) == 0);
      r = from_real(to_real(a) * to_real(b), ovf);
      if (ovf) n_ovf++;
      exp_q.push_back(r); exc_q.push_back(ovf | xin); cyc_q.push_back(cycle);
      ready <= 1; op1 <= a; op2 <= b; exc_in <= xin;
      @(posedge clk);
      if (i % 7 == 3) begin ready <= 0; @(posedge clk); end
    end
    ready <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_ovf == 0) begin
      failures++;
      $display("FAIL: %0d results missing, %0d overflows", exp_q.size(), n_ovf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
