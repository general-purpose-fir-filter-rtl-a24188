// tb_index_mapper: every residue 0..256. Zero must raise nan; any other
// residue v must give an index i with 3^i = v mod 257.
module tb_index_mapper;
  import fir_pkg::*;
  import fir_ref_pkg::*;
  logic [RES_W-1:0] res;
  index_t ix;
  int checks = 0, failures = 0;

  index_mapper dut (.res(res), .ix(ix));

  initial begin
    for (int v = 0; v < 257; v++) begin
      res = RES_W'(v);
      #1;
      checks++;
      if (v == 0) begin
        if (!ix.nan) begin failures++; $display("FAIL zero not flagged"); end
      end else if (ix.nan || pow257(3, int'(ix.idx)) != v) begin
        failures++;
        $display("FAIL v=%0d idx=%0d nan=%0b", v, ix.idx, ix.nan);
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
