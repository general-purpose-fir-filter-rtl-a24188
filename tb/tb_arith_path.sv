// tb_arith_path: a 6-tap array. Random coefficients (some zero) are held
// while random sample indices stream in, one per clock. Two cycles after a
// sample enters, each channel must hold sum_k h[k]*x[n-k] mod 257 in
// deferred-carry form.
module tb_arith_path;
  import fir_pkg::*;
  import fir_ref_pkg::*;
  localparam int NT = 6;
  logic   clk = 0, rst_n = 0;
  index_t x_ix [NCH];
  index_t coef_ix [NT][NCH];
  d1acc_t acc [NCH];
  int checks = 0, failures = 0;

  arith_path #(.N_TAPS(NT)) dut (.clk(clk), .rst_n(rst_n), .x_ix(x_ix), .coef_ix(coef_ix), .acc(acc));

  always #5 clk = ~clk;

  function automatic int ixval(index_t x);
    return x.nan ? 0 : pow257(3, int'(x.idx));
  endfunction

  int hist [NCH][$];   // sample values per channel, newest first
  int expq [NCH][$];

  initial begin
    for (int k = 0; k < NT; k++)
      for (int c = 0; c < NCH; c++) begin
        coef_ix[k][c].nan = ($urandom_range(5) == 0);
        coef_ix[k][c].idx = 8'($urandom);
      end
    for (int c = 0; c < NCH; c++) x_ix[c] = '{nan: 1'b1, idx: 8'd0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      // after the edge just passed, the sum for the sample driven 3 cycles ago is out
      if (i >= 3)
        for (int c = 0; c < NCH; c++) begin
          int got, exp;
          got = m257(int'(acc[c].p) + (acc[c].carry ? 0 : 1) + 1);
          exp = expq[c].pop_front();
          checks++;
          if (got != exp) begin
            failures++;
            $display("FAIL i=%0d ch%0d got %0d exp %0d", i, c, got, exp);
          end
        end
      for (int c = 0; c < NCH; c++) begin
        longint s;
        x_ix[c].nan = ($urandom_range(7) == 0);
        x_ix[c].idx = 8'($urandom);
        hist[c].push_front(ixval(x_ix[c]));
        s = 0;
        for (int k = 0; k < NT && k < hist[c].size(); k++)
          s += longint'(ixval(coef_ix[k][c])) * hist[c][k];
        expq[c].push_back(m257l(s));
      end
      @(negedge clk);
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
