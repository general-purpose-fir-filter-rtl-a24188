// tb_map_rom: every address of the 16x3 selection table. The word must be
// the address itself below 4 and the address minus 8 from 4 upwards.
module tb_map_rom;
  logic [3:0] addr;
  logic [2:0] data;
  int checks = 0, failures = 0;

  map_rom dut (.addr(addr), .data(data));

  initial begin
    for (int i = 0; i < 16; i++) begin
      int exp;
      addr = 4'(i);
      #1;
      exp = (i < 4) ? i : i - 8;
      checks++;
      if ($signed(data) != 3'(exp)) begin
        failures++;
        $display("FAIL addr %0d: %0d expected %0d", i, $signed(data), exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
