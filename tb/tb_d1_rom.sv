// tb_d1_rom: all 256 indices; the word must be 3^a mod 257 minus one.
module tb_d1_rom;
  import fir_ref_pkg::*;
  logic [7:0] a, d;
  int checks = 0, failures = 0;

  d1_rom dut (.a(a), .d(d));

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks++;
      if (int'(d) != pow257(3, i) - 1) begin
        failures++;
        $display("FAIL a=%0d d=%0d exp %0d", i, d, pow257(3, i) - 1);
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
