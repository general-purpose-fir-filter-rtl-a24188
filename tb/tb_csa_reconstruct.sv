// tb_csa_reconstruct: random coefficients and correction sums; the output
// must equal sum c_i*8^i + sum corr_j*8^(3+j) + z6*8^6 modulo 2^25.
module tb_csa_reconstruct;
  import fir_pkg::*;
  logic signed [COEF_W-1:0] coef [NCH];
  logic signed [CORR_W-1:0] corr [NDIG];
  logic signed [CORR_W-1:0] z6;
  logic signed [Y_W-1:0]    y;
  int checks = 0, failures = 0;

  csa_reconstruct dut (.coef(coef), .corr(corr), .z6(z6), .y(y));

  initial begin
    repeat (3000) begin
      longint e;
      logic [Y_W-1:0] ew;
      e = 0;
      for (int i = 0; i < NCH; i++) begin
        coef[i] = COEF_W'(int'($urandom_range(256)) - 128);
        e += longint'(coef[i]) <<< (3 * i);
      end
      for (int j = 0; j < NDIG; j++) begin
        corr[j] = CORR_W'(int'($urandom_range(848)) - 424);
        e += longint'(corr[j]) <<< (9 + 3 * j);
      end
      z6 = CORR_W'(int'($urandom_range(106)) - 53);
      e += longint'(z6) <<< 18;
      ew = Y_W'(e);
      #1;
      checks++;
      if (y !== ew) begin
        failures++;
        $display("FAIL y=%0d exp %0d", y, $signed(ew));
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
