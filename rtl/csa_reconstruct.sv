// csa_reconstruct: final polynomial evaluation at X = 8.
//
// Adds the five recovered product coefficients c_i at weights 2^(3i)
// (i = 0..4), the three poly_adder sums at 2^9, 2^12 and 2^15, and the X^6
// sum at 2^18, giving the filter output as a 25-bit two's complement word.
// The nine sign-extended rows are reduced by a chain of 3:2 carry-save
// stages to two rows, which one carry-propagate addition combines. The
// result is taken modulo 2^25, which is exact whenever the true output fits
// 25 bits.
// The rows, their weights and the carry-save form follow the document's
// CSA array; the order in which rows are compressed is this design's
// choice. Purely combinational.
module csa_reconstruct
  import fir_pkg::*;
(
  input  logic signed [COEF_W-1:0] coef [NCH],
  input  logic signed [CORR_W-1:0] corr [NDIG],
  input  logic signed [CORR_W-1:0] z6,
  output logic signed [Y_W-1:0]    y
);
  localparam int unsigned NROW = NCH + NDIG + 1;

  logic [Y_W-1:0] row [NROW];
  logic [Y_W-1:0] s, c;

  always_comb begin
    for (int i = 0; i < NCH; i++)
      row[i] = Y_W'(signed'(coef[i])) << (R * i);
    for (int j = 0; j < NDIG; j++)
      row[NCH + j] = Y_W'(signed'(corr[j])) << (R * (NDIG + j));
    row[NROW-1] = Y_W'(signed'(z6)) << (R * 2 * NDIG);

    // carry-save reduction: fold one row at a time into (s, c)
    s = row[0];
    c = row[1];
    for (int r = 2; r < NROW; r++) begin
      logic [Y_W-1:0] ns, nc;
      ns = s ^ c ^ row[r];
      nc = ((s & c) | (s & row[r]) | (c & row[r])) << 1;
      s  = ns;
      c  = nc;
    end
    y = signed'(s + c);
  end
endmodule
