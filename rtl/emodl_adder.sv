// emodl_adder: W-bit binary adder assembled from identical one-bit cells.
//
// Each cell produces the sum bit and the carry for the next position, so a
// wider adder is grown by appending cells, the modular structure the
// document gives for its dynamic (domino) adders. The transistor-level
// dual-rail domino implementation is not modelled: this is the logic
// function only, a plain ripple of full-adder cells (this design's choice).
// Purely combinational.
//
//   a, b  : W-bit operands        cin  : carry into bit 0
//   sum   : W-bit result          cout : carry out of bit W-1
module emodl_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    assign sum[i] = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end
  assign cout = c[W];
endmodule
