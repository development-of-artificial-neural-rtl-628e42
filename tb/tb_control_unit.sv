// tb_control_unit: runs the control unit against stand-in arithmetic units
// that answer READY/START with DONE after a fixed (multiplier 3, adder 4) or
// random (activation 1..40) number of cycles. Every issued operation is
// compared with the expected twelve-step program of the 2-2-1 network:
// unit, MUX_0 source, ROM address, MUX_1 sources and destination register,
// the write enable must be one-hot and come exactly with the unit's DONE,
// and DONE of the whole run must follow the last write by one cycle. The
// run length in cycles is checked against the step costs.
module tb_control_unit;
  import fp17_pkg::*;

  logic            clk = 0, rst = 1, start = 0;
  logic            mul_done = 0, add_done = 0, act_done = 0;
  logic [2:0]      rom_addr;
  mux0_sel_e       mux0_sel;
  mux1_sel_e       mux1_sel_a, mux1_sel_b;
  logic            mul_ready, add_ready, act_start;
  logic [NREG-1:0] reg0_en, reg1_en;
  logic            reg1_from_act, busy, done;

  control_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // expected program: unit (0 mul, 1 add, 2 act), mux_0 code, address,
  // mux_1 a code, mux_1 b code, destination
  int exp_unit [12] = '{0, 0, 0, 0, 1, 1, 2, 2, 0, 0, 1, 2};
  int exp_m0   [12] = '{0, 1, 0, 1, 0, 0, 0, 0, 8, 9, 0, 0};
  int exp_addr [12] = '{0, 1, 2, 3, 0, 0, 0, 0, 4, 5, 0, 0};
  int exp_a    [12] = '{0, 0, 0, 0, 1, 3, 7, 8, 0, 0, 5, 9};
  int exp_b    [12] = '{0, 0, 0, 0, 2, 4, 0, 0, 0, 0, 6, 0};
  int exp_dst  [12] = '{0, 1, 2, 3, 0, 1, 3, 4, 4, 5, 2, 5};

  int step, act_lat, pending_unit, countdown, expected_cycles, cycles, writes;

  // stand-in units
  always @(posedge clk) begin
    mul_done <= 0; add_done <= 0; act_done <= 0;
    if (countdown > 0) begin
      countdown <= countdown - 1;
      if (countdown == 1) begin
        if (pending_unit == 0) mul_done <= 1;
        if (pending_unit == 1) add_done <= 1;
        if (pending_unit == 2) act_done <= 1;
      end
    end
    if (mul_ready || add_ready || act_start) begin
      int u;
      u = mul_ready ? 0 : add_ready ? 1 : 2;
      checks++;
      if (step >= 12 || u != exp_unit[step] || (exp_unit[step] == 0 &&
          (int'(mux0_sel) != exp_m0[step] || int'(rom_addr) != exp_addr[step])) ||
          (exp_unit[step] != 0 && int'(mux1_sel_a) != exp_a[step]) ||
          (exp_unit[step] == 1 && int'(mux1_sel_b) != exp_b[step]) ||
          (mul_ready + add_ready + act_start) != 1) begin
        failures++;
        $display("FAIL: step %0d issue unit %0d m0 %0d addr %0d a %0d b %0d",
                 step, u, mux0_sel, rom_addr, mux1_sel_a, mux1_sel_b);
      end
      // DONE is to be high LAT cycles after the issue cycle
      pending_unit <= u;
      act_lat = (u == 0) ? 3 : (u == 1) ? 4 : $urandom_range(1, 40);
      if (act_lat == 1) begin
        if (u == 2) act_done <= 1;
      end else begin
        countdown <= act_lat - 1;
      end
      expected_cycles += act_lat + 1;
    end
    if (reg0_en != 0 || reg1_en != 0) begin
      checks++;
      writes++;
      if (step >= 12 ||
          !((exp_unit[step] == 0 && mul_done && reg1_en == 0 && reg0_en == NREG'(1 << exp_dst[step])) ||
            (exp_unit[step] == 1 && add_done && reg0_en == 0 && !reg1_from_act &&
             reg1_en == NREG'(1 << exp_dst[step])) ||
            (exp_unit[step] == 2 && act_done && reg0_en == 0 && reg1_from_act &&
             reg1_en == NREG'(1 << exp_dst[step])))) begin
        failures++;
        $display("FAIL: step %0d write reg0_en %b reg1_en %b", step, reg0_en, reg1_en);
      end
      step <= step + 1;
    end
  end

  task automatic run();
    step = 0; expected_cycles = 1; writes = 0;
    start <= 1;
    @(posedge clk);
    start <= 0;
    cycles = 0;
    do begin @(posedge clk); cycles++; end while (!done && cycles < 1000);
    checks++;
    if (!done || step != 12 || writes != 12 || cycles != expected_cycles || busy) begin
      failures++;
      $display("FAIL: run ended after %0d cycles (expected %0d), %0d steps", cycles,
               expected_cycles, step);
    end
  endtask

  initial begin
    countdown = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    checks++;
    if (busy || done) failures++;
    for (int r = 0; r < 20; r++) begin
      run();
      repeat ($urandom_range(0, 3)) @(posedge clk);
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
