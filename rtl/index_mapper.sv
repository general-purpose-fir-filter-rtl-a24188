// index_mapper: forward index mapper of one channel.
//
// Converts a residue v of Z_257 into index form for the Fermat ALU: a zero
// flag (nan) that is set for v = 0, and the 8-bit discrete logarithm of v to
// the primitive root 3 (G^idx = v mod 257). The 257-entry table is computed
// at elaboration from that definition. The document names the block; the
// table form and the root are this design's choices. Combinational.
module index_mapper
  import fir_pkg::*;
(
  input  logic [RES_W-1:0] res,
  output index_t           ix
);
  localparam logtab_t LOG = log_table();

  always_comb begin
    ix.nan = (res == '0) || (res >= RES_W'(M));
    ix.idx = ix.nan ? 8'd0 : LOG[res];
  end
endmodule
