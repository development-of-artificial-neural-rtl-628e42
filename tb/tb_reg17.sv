// tb_reg17: checks that the 17-bit register resets to zero, loads D only
// while EN is high, and holds its value otherwise, over random traffic.
module tb_reg17;
  import fp17_pkg::*;

  logic  clk = 0, rst = 1, en = 0;
  fp17_t d = '0, q;
  logic [16:0] model;
  int checks = 0, failures = 0;

  reg17 dut (.clk, .rst, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    @(posedge clk); #1;
    checks++; if (q !== 17'd0) failures++;
    rst = 0; model = 0;
    for (int i = 0; i < 500; i++) begin
      en = 1'($urandom); d = 17'($urandom);
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL: q %h want %h", q, model);
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
