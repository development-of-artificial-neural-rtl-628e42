// tb_mux_0: sets every source of the multiplier's operand selector to a
// distinct random word and checks, for every select code (including the
// unused ones, which must give zero), that the data output is the source
// printed at that input number and that the weight output is the ROM word.
module tb_mux_0;
  import fp17_pkg::*;

  mux0_sel_e sel;
  fp17_t in0, in1, rom_data, data_out, weight_out;
  fp17_t reg0_q [NREG];
  fp17_t reg1_q [NREG];
  logic [16:0] want;
  int checks = 0, failures = 0;

  mux_0 dut (.sel, .in0, .in1, .reg0_q, .reg1_q, .rom_data, .data_out, .weight_out);

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      in0 = 17'($urandom); in1 = 17'($urandom); rom_data = 17'($urandom);
      for (int r = 0; r < NREG; r++) begin
        reg0_q[r] = 17'($urandom); reg1_q[r] = 17'($urandom);
      end
      for (int s = 0; s < 16; s++) begin
        sel = mux0_sel_e'(s);
        case (s)
          0: want = in0;        1: want = in1;
          4: want = reg0_q[2];  5: want = reg0_q[3];
          6: want = reg0_q[4];  7: want = reg0_q[5];
          8: want = reg1_q[3];  9: want = reg1_q[4];
          default: want = 17'd0;
        endcase
        #1;
        checks++;
        if (data_out !== want || weight_out !== rom_data) begin
          failures++;
          $display("FAIL: sel %0d data %h want %h weight %h rom %h",
                   s, data_out, want, weight_out, rom_data);
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
