// tb_input_mapper: every sample from -512 to 511. The enhanced polynomial
// must add back up to the sample (-512 saturates to -511), keep every digit
// within -4..4 and the top digit within -1..1, and agree digit by digit with
// the reference rewrite.
module tb_input_mapper;
  import fir_pkg::*;
  import fir_ref_pkg::*;
  logic signed [SAMP_W-1:0] sample;
  epoly_t poly;
  int checks = 0, failures = 0;

  input_mapper dut (.sample(sample), .poly(poly));

  initial begin
    for (int s = -512; s < 512; s++) begin
      int sum, exp_s, rd [3], rt;
      bit ok;
      sample = SAMP_W'(s);
      #1;
      exp_s = (s == -512) ? -511 : s;
      emap(exp_s, rd, rt);
      sum = int'(poly.top) * 512;
      ok = (poly.top != 2'sb10) && (int'(poly.top) == rt);
      for (int i = 0; i < 3; i++) begin
        sum += int'(poly.dig[i]) << (3 * i);
        if (poly.dig[i] > 4 || poly.dig[i] < -4) ok = 0;
        if (int'(poly.dig[i]) != rd[i]) ok = 0;
      end
      checks++;
      if (!ok || sum != exp_s) begin
        failures++;
        $display("FAIL s=%0d top=%0d d=%0d,%0d,%0d", s, poly.top,
                 poly.dig[2], poly.dig[1], poly.dig[0]);
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
