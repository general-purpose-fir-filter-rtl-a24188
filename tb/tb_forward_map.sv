// tb_forward_map: random digit triples in -4..4; each channel must hold the
// polynomial evaluated at its point (0, 1, -1, 2, -2) modulo 257.
module tb_forward_map;
  import fir_pkg::*;
  import fir_ref_pkg::*;
  digit_t [NDIG-1:0]           dig;
  logic [NCH-1:0][RES_W-1:0]   res;
  int checks = 0, failures = 0;
  int pts [5] = '{0, 1, -1, 2, -2};

  forward_map dut (.dig(dig), .res(res));

  initial begin
    repeat (1000) begin
      int d [3];
      for (int j = 0; j < 3; j++) begin
        d[j] = int'($urandom_range(8)) - 4;
        dig[j] = DIG_W'(d[j]);
      end
      #1;
      for (int k = 0; k < 5; k++) begin
        int exp;
        exp = m257(d[0] + d[1] * pts[k] + d[2] * pts[k] * pts[k]);
        checks++;
        if (int'(res[k]) != exp) begin
          failures++;
          $display("FAIL ch%0d d=%0d,%0d,%0d got %0d exp %0d", k, d[2], d[1], d[0], res[k], exp);
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
