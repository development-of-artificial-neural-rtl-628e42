// tb_reg_bank: drives random data and random enable patterns into a bank
// of six registers and compares all six outputs with a model after every
// clock edge; also checks the reset value.
module tb_reg_bank;
  import fp17_pkg::*;

  logic            clk = 0, rst = 1;
  logic [NREG-1:0] reg_en = '0;
  fp17_t           d = '0;
  fp17_t           q [NREG];
  logic [16:0]     model [NREG];
  int checks = 0, failures = 0;

  reg_bank dut (.clk, .rst, .reg_en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    @(posedge clk); #1;
    for (int r = 0; r < NREG; r++) begin
      model[r] = 0;
      checks++; if (q[r] !== 17'd0) failures++;
    end
    rst = 0;
    for (int i = 0; i < 500; i++) begin
      reg_en = (i % 3 == 0) ? NREG'(1 << (i % NREG)) : NREG'($urandom);
      d = 17'($urandom);
      @(posedge clk);
      for (int r = 0; r < NREG; r++) if (reg_en[r]) model[r] = d;
      #1;
      for (int r = 0; r < NREG; r++) begin
        checks++;
        if (q[r] !== model[r]) begin
          failures++;
          $display("FAIL: reg %0d = %h want %h", r, q[r], model[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
