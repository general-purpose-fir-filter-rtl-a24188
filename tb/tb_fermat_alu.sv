// tb_fermat_alu: one ALU with random operands (some zero) and random
// incoming partial sums in every cycle. After the edge that ends cycle t+2
// the outgoing partial sum must stand for acc_in + a_t*b_t mod 257, where
// a partial sum {p, carry} stands for p + !carry + 1. Also checks that p
// never exceeds 256 and that p = 256 only comes with the carry set.
module tb_fermat_alu;
  import fir_pkg::*;
  import fir_ref_pkg::*;
  logic   clk = 0, rst_n = 0;
  index_t a, b;
  d1acc_t acc_in, acc_out;
  int checks = 0, failures = 0, zero_ops = 0;

  fermat_alu dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .acc_in(acc_in), .acc_out(acc_out));

  always #5 clk = ~clk;

  function automatic int accval(d1acc_t x);
    return m257(int'(x.p) + (x.carry ? 0 : 1) + 1);
  endfunction

  function automatic int ixval(index_t x);
    return x.nan ? 0 : pow257(3, int'(x.idx));
  endfunction

  function automatic index_t rand_ix();
    index_t r;
    r.nan = ($urandom_range(9) == 0);
    r.idx = 8'($urandom);
    return r;
  endfunction

  function automatic d1acc_t rand_acc();
    d1acc_t r;
    r.p = 9'($urandom_range(256));
    r.carry = (r.p == 9'h100) ? 1'b1 : 1'($urandom);
    return r;
  endfunction

  int prod [3];
  int exp_next;
  bit have_exp;

  initial begin
    a = '{nan: 1'b1, idx: 8'd0};
    b = '{nan: 1'b1, idx: 8'd0};
    acc_in = D1_ZERO;
    prod = '{0, 0, 0};
    have_exp = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (have_exp) begin
        checks++;
        if (accval(acc_out) != exp_next || acc_out.p > 9'h100 ||
            (acc_out.p == 9'h100 && !acc_out.carry)) begin
          failures++;
          $display("FAIL cycle %0d: p=%0d c=%0b value %0d expected %0d",
                   i, acc_out.p, acc_out.carry, accval(acc_out), exp_next);
        end
      end
      a = rand_ix();
      b = rand_ix();
      if (a.nan || b.nan) zero_ops++;
      acc_in = (i % 7 == 0) ? D1_ZERO : rand_acc();
      prod[2] = prod[1];
      prod[1] = prod[0];
      prod[0] = m257(ixval(a) * ixval(b));
      exp_next = m257(accval(acc_in) + prod[2]);
      have_exp = 1;
    end
    if (zero_ops == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
