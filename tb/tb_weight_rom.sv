// tb_weight_rom: reads every address of the weight ROM and compares the
// decoded value with the intended weights 0.5, -0.25, 0.75, 1.5, 1.25, -2.0
// (and zero for the two unused addresses). A second instance with other
// weights checks that the WEIGHTS parameter is honoured.
module tb_weight_rom;
  import fp17_pkg::*;
  import fp17_ref_pkg::*;

  logic [2:0] address;
  fp17_t      data, data2;
  real        want [8] = '{0.5, -0.25, 0.75, 1.5, 1.25, -2.0, 0.0, 0.0};
  int checks = 0, failures = 0;

  weight_rom dut (.address, .data);
  weight_rom #(.WEIGHTS('{17'h07C00, 17'h0, 17'h0, 17'h0, 17'h0, 17'h183FF}))
    dut2 (.address, .data(data2));

  initial begin
    for (int a = 0; a < 8; a++) begin
      address = 3'(a);
      #1;
      checks++;
      if (to_real(data) != want[a]) begin
        failures++;
        $display("FAIL: W%0d = %h (%f) want %f", a, data, to_real(data), want[a]);
      end
    end
    address = 0; #1; checks++; if (to_real(data2) != 1.0) failures++;
    address = 5; #1; checks++; if (to_real(data2) != -2.0 * (1.0 + 1023.0/1024.0)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
