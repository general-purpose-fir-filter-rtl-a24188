// map_rom: the 16x3 coefficient-selection table of the input polynomial
// mapper (a switching-tree ROM in the document).
//
// Address t (0..15) is the magnitude of one digit plus the carry from the
// digit below, so only 0..8 occur. The word is the replacement digit a' as a
// 3-bit two's complement number: t itself when t < 4, and t - 8 (a
// negative digit with a carry of +1 into the next position) when t >= 4.
// The carry itself is produced outside the ROM, in input_mapper. Entries 9..15
// never occur and hold t - 8 mod 8 as well. The table is computed from that
// rule rather than listed. Which way the value 4 goes is not fixed by the
// document; here it becomes -4 with a carry. Combinational.
module map_rom (
  input  logic [3:0] addr,
  output logic [2:0] data
);
  typedef logic [2:0] rom_t [16];

  function automatic rom_t contents();
    rom_t t;
    for (int i = 0; i < 16; i++) t[i] = (i < 4) ? 3'(i) : 3'(i - 8);
    return t;
  endfunction

  localparam rom_t ROM = contents();

  assign data = ROM[addr];
endmodule
