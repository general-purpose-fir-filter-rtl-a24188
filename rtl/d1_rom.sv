// d1_rom: minimized inverse-index ROM of the Fermat ALU.
//
// Maps an 8-bit index a to the diminished-1 form of 3^a mod 257, that is
// 3^a - 1. Because 3^(a+128) = -3^a mod 257 and the diminished-1 form of
// -v is the bitwise inverse of that of v, only the first 128 words are
// stored: a[6:0] addresses a 128x8 table and a[7] selects the true or the
// inverted word. The half-table-plus-inversion structure follows the
// document; the table is computed at elaboration. Combinational.
module d1_rom
  import fir_pkg::*;
(
  input  logic [7:0] a,
  output logic [7:0] d
);
  localparam rom128_t ROM = half_rom();
  logic [7:0] c;

  assign c = ROM[a[6:0]];
  assign d = a[7] ? ~c : c;
endmodule
