// forward_map: evaluation map of an enhanced sample polynomial into the
// direct product ring Z_257^5.
//
// The degree-2 part A(x) = a2*x^2 + a1*x + a0 of the enhanced polynomial is
// evaluated at the five points {0, 1, -1, 2, -2} of Z_257, giving one
// residue (0..256) per channel; this is the product of the coefficient
// vector with a 5x3 Vandermonde matrix. The extra coefficient a'3 does not
// enter the ring: it is handled by poly_adder. The document gives the
// evaluation map but not its points; the points are this design's choice.
// Purely combinational.
module forward_map
  import fir_pkg::*;
(
  input  digit_t [NDIG-1:0]       dig,
  output logic   [NCH-1:0][RES_W-1:0] res
);
  for (genvar k = 0; k < NCH; k++) begin : g_ch
    assign res[k] = RES_W'(eval_point(dig, PT[k]));
  end
endmodule
