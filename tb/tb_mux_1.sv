// tb_mux_1: sets every source of the adder's operand selector to a distinct
// random word and checks both outputs for every pair of select codes:
// 0 = ROM, 1..6 = REG_0 entries 0..5, 7..11 = REG_1 entries 0..4, others 0.
module tb_mux_1;
  import fp17_pkg::*;

  mux1_sel_e sel_a, sel_b;
  fp17_t rom_data, op_a, op_b;
  fp17_t reg0_q [NREG];
  fp17_t reg1_q [NREG];
  int checks = 0, failures = 0;

  mux_1 dut (.sel_a, .sel_b, .rom_data, .reg0_q, .reg1_q, .op_a, .op_b);

  function automatic logic [16:0] expect_of(int s);
    if (s == 0) return rom_data;
    if (s >= 1 && s <= 6) return reg0_q[s-1];
    if (s >= 7 && s <= 11) return reg1_q[s-7];
    return 17'd0;
  endfunction

  initial begin
    for (int rep = 0; rep < 5; rep++) begin
      rom_data = 17'($urandom);
      for (int r = 0; r < NREG; r++) begin
        reg0_q[r] = 17'($urandom); reg1_q[r] = 17'($urandom);
      end
      for (int a = 0; a < 16; a++)
        for (int b = 0; b < 16; b++) begin
          sel_a = mux1_sel_e'(a); sel_b = mux1_sel_e'(b);
          #1;
          checks++;
          if (op_a !== expect_of(a) || op_b !== expect_of(b)) begin
            failures++;
            $display("FAIL: sel %0d/%0d got %h/%h", a, b, op_a, op_b);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
