// tb_poly_adder: a 5-tap chain with random enhanced coefficients and
// samples, one sample per clock. After the edge ending the cycle in which
// sample n is presented, corr[j] must equal sum_k (a3(x[n-k])*h_k[j] +
// b3(h_k)*x[n-k][j]) and z6 must equal sum_k a3(x[n-k])*b3(h_k).
module tb_poly_adder;
  import fir_pkg::*;
  localparam int NT = 5;
  logic   clk = 0, rst_n = 0;
  epoly_t x;
  epoly_t coef [NT];
  logic signed [CORR_W-1:0] corr [NDIG];
  logic signed [CORR_W-1:0] z6;
  int checks = 0, failures = 0;

  poly_adder #(.N_TAPS(NT)) dut (.clk(clk), .rst_n(rst_n), .x(x), .coef(coef), .corr(corr), .z6(z6));

  always #5 clk = ~clk;

  function automatic epoly_t rand_poly();
    epoly_t p;
    p.top = 2'(int'($urandom_range(2)) - 1);
    for (int j = 0; j < NDIG; j++) p.dig[j] = DIG_W'(int'($urandom_range(8)) - 4);
    return p;
  endfunction

  epoly_t hist [$];

  initial begin
    for (int k = 0; k < NT; k++) coef[k] = rand_poly();
    x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      x = rand_poly();
      hist.push_front(x);
      @(negedge clk);
      begin
        int ec [NDIG];
        int ez;
        ez = 0;
        for (int j = 0; j < NDIG; j++) ec[j] = 0;
        for (int k = 0; k < NT && k < hist.size(); k++) begin
          for (int j = 0; j < NDIG; j++)
            ec[j] += int'(hist[k].top) * int'(coef[k].dig[j]) + int'(coef[k].top) * int'(hist[k].dig[j]);
          ez += int'(hist[k].top) * int'(coef[k].top);
        end
        for (int j = 0; j < NDIG; j++) begin
          checks++;
          if (int'(corr[j]) != ec[j]) begin
            failures++;
            $display("FAIL i=%0d corr[%0d]=%0d exp %0d", i, j, corr[j], ec[j]);
          end
        end
        checks++;
        if (int'(z6) != ez) begin
          failures++;
          $display("FAIL i=%0d z6=%0d exp %0d", i, z6, ez);
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
