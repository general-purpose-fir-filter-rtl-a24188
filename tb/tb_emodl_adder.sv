// tb_emodl_adder: random and corner operands for an 8-bit adder, compared
// with the integer sum including carry in and carry out.
module tb_emodl_adder;
  logic [7:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;

  emodl_adder #(.W(8)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check();
    int exp;
    #1;
    exp = int'(a) + int'(b) + int'(cin);
    checks++;
    if ({cout, sum} != 9'(exp)) begin
      failures++;
      $display("FAIL %0d+%0d+%0d = %0d got %0d", a, b, cin, exp, {cout, sum});
    end
  endtask

  initial begin
    a = 8'hff; b = 8'h00; cin = 1; check();
    a = 8'hff; b = 8'hff; cin = 1; check();
    a = 8'h00; b = 8'h00; cin = 0; check();
    repeat (2000) begin
      a = 8'($urandom); b = 8'($urandom); cin = 1'($urandom);
      check();
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
