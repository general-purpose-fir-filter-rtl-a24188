// tb_inverse_map: random product polynomials with coefficients in
// -128..128 are evaluated at the five points, each residue is written in a
// randomly chosen one of its deferred-carry encodings, and the block must
// return the original coefficients.
module tb_inverse_map;
  import fir_pkg::*;
  import fir_ref_pkg::*;
  d1acc_t acc [NCH];
  logic signed [COEF_W-1:0] coef [NCH];
  int checks = 0, failures = 0;
  int pts [5] = '{0, 1, -1, 2, -2};

  inverse_map dut (.acc(acc), .coef(coef));

  // an encoding {p, carry} of residue v: p + !carry + 1 = v mod 257
  function automatic d1acc_t encode(int v);
    d1acc_t r;
    bit e;
    e = 1'($urandom);
    if (v == 0)       r = e ? '{p: 9'd255, carry: 1'b0} : '{p: 9'h100, carry: 1'b1};
    else if (v == 1)  r = '{p: 9'd0, carry: 1'b1};
    else              r = e ? '{p: 9'(v - 2), carry: 1'b0} : '{p: 9'(v - 1), carry: 1'b1};
    return r;
  endfunction

  initial begin
    repeat (2000) begin
      int c [5];
      for (int j = 0; j < 5; j++) c[j] = int'($urandom_range(256)) - 128;
      for (int k = 0; k < 5; k++) begin
        longint s, pw;
        s = 0; pw = 1;
        for (int j = 0; j < 5; j++) begin
          s += c[j] * pw;
          pw *= pts[k];
        end
        acc[k] = encode(m257l(s));
      end
      #1;
      for (int j = 0; j < 5; j++) begin
        checks++;
        if (int'(coef[j]) != c[j]) begin
          failures++;
          $display("FAIL coef[%0d]=%0d exp %0d", j, coef[j], c[j]);
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
