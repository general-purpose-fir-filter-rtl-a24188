// input_mapper: enhanced input polynomial mapping of one binary sample.
//
// The sample s (two's complement, range -511..511) is first split, as a
// sign and a 9-bit magnitude, into three 3-bit digits m0..m2 so that
// |s| = m2*64 + m1*8 + m0 (the simple map, digits 0..7). The digits are
// then rewritten one after the other from the least significant: the digit
// plus the carry from below addresses a 16x3 map_rom, whose word is the new
// digit a' in -4..3; whenever that sum is 4 or more a carry of +1 goes to
// the next digit. The carry out of the top digit becomes the extra
// coefficient a'3 of X^3. Finally every digit takes the sign of s, so
// s = a'3*512 + a'2*64 + a'1*8 + a'0 with |a'i| <= 4 and a'3 in {-1,0,1}.
//
// The digit-serial ROM-and-adder chain follows the document. Splitting the
// sample by sign and magnitude, the value 4 going to -4 with a carry, and
// saturating the unused code -512 to -511 are this design's own choices.
// Purely combinational.
module input_mapper
  import fir_pkg::*;
(
  input  logic signed [SAMP_W-1:0] sample,
  output epoly_t                   poly
);
  logic         neg;
  logic [8:0]   mag;
  logic [3:0]   t   [NDIG];
  logic [2:0]   ap  [NDIG];
  logic [NDIG:0] c;

  always_comb begin
    neg = sample[SAMP_W-1];
    if (sample == {1'b1, {(SAMP_W-1){1'b0}}}) mag = 9'd511;  // -512 saturates
    else if (neg)                             mag = 9'(-sample);
    else                                      mag = 9'(sample);
  end

  assign c[0] = 1'b0;
  for (genvar i = 0; i < NDIG; i++) begin : g_dig
    logic unused_cout;
    emodl_adder #(.W(4)) u_add (
      .a    ({1'b0, mag[R*i +: R]}),
      .b    (4'd0),
      .cin  (c[i]),
      .sum  (t[i]),
      .cout (unused_cout)
    );
    map_rom u_rom (.addr(t[i]), .data(ap[i]));
    assign c[i+1] = t[i][3] | t[i][2];
  end

  always_comb begin
    for (int i = 0; i < NDIG; i++) begin
      poly.dig[i] = neg ? -digit_t'($signed(ap[i])) : digit_t'($signed(ap[i]));
    end
    poly.top = c[NDIG] ? (neg ? -2'sd1 : 2'sd1) : 2'sd0;
  end
endmodule
