// inverse_map: from the five channel sums back to polynomial coefficients.
//
// First the deferred carry left by the last ALU is settled: a partial sum
// {p, carry} becomes the residue (p + !carry + 1) mod 257. The five residues
// are then multiplied by the inverse of the 5x5 Vandermonde matrix of the
// evaluation points, giving the coefficients c0..c4 of the product
// polynomial mod 257. Because the mapping ideal has degree 5, higher than
// that of any product, no reduction is lost. Each coefficient is finally
// centred into -128..128 (residues above 128 are taken as negative). The
// result is exact as long as every true coefficient lies in that range;
// otherwise it is the wrapped value (overflow is not flagged, nor is it in
// the document). The matrix is computed at elaboration.
// The document gives the inverse mapping; its arithmetic form here
// (constant multiply-add then modulo reduction) is this design's choice.
// Purely combinational.
module inverse_map
  import fir_pkg::*;
(
  input  d1acc_t                         acc  [NCH],
  output logic signed [COEF_W-1:0]       coef [NCH]
);
  localparam mat_t VINV = vandermonde_inverse();

  // settle the deferred carry: (p + !carry + 1) mod 257
  function automatic int unsigned settle(d1acc_t a);
    return (unsigned'(32'(a.p)) + (a.carry ? 0 : 1) + 1) % M;
  endfunction

  // coefficient j of the product polynomial, centred into -128..128
  function automatic logic signed [COEF_W-1:0] coef_of(d1acc_t a [NCH], int j);
    int unsigned s, c;
    s = 0;
    for (int k = 0; k < NCH; k++) s += unsigned'(VINV[j*NCH+k]) * settle(a[k]);
    c = s % M;
    return (c > (M - 1) / 2) ? COEF_W'(int'(c) - int'(M)) : COEF_W'(c);
  endfunction

  for (genvar j = 0; j < NCH; j++) begin : g_coef
    assign coef[j] = coef_of(acc, j);
  end
endmodule
