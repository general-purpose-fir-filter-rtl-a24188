// fermat_alu: one multiply-accumulate cell of one mod-257 channel.
//
// Multiplication is done on indices: the 8-bit discrete logs of the two
// operands are added modulo 256 and d1_rom turns the sum back into the
// diminished-1 form (value - 1) of the product. If either operand is zero
// (its nan flag is set) the product is replaced by 9'h100, the diminished-1
// code of zero. Accumulation is a diminished-1 addition with the end-around
// carry deferred: the incoming partial sum arrives with the raw carry of the
// previous cell, its inverse is the carry-in of this cell's adder, and this
// cell's own carry-out is passed on in the same way. A partial sum {p, carry}
// stands for (p + !carry + 1) mod 257; {9'h100, 1} is zero. Adding 9'h100
// leaves that value unchanged, which is how a zero product passes through.
//
// The index adder, the half ROM, the zero substitution and the inverted
// carry between cells follow the document's block diagram. Splitting the
// cell into three register stages (index add | ROM | accumulate), one adder
// or ROM per stage, is this design's choice.
//
// Timing: a and b sampled in cycle t contribute to acc_out after the clock
// edge that ends cycle t+2; acc_in is sampled by that same edge.
module fermat_alu
  import fir_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  index_t a,        // sample operand, index form
  input  index_t b,        // coefficient operand, index form
  input  d1acc_t acc_in,   // partial sum from the next tap, with its carry
  output d1acc_t acc_out   // partial sum to the previous tap, with carry
);
  // stage 1: index addition modulo 256
  logic [7:0] isum;
  logic       isum_cout;  // dropped: the index sum is taken modulo 256
  logic [7:0] s1_idx;
  logic       s1_zero;

  emodl_adder #(.W(8)) u_iadd (
    .a(a.idx), .b(b.idx), .cin(1'b0), .sum(isum), .cout(isum_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_idx  <= '0;
      s1_zero <= 1'b1;
    end else begin
      s1_idx  <= isum;
      s1_zero <= a.nan | b.nan;
    end
  end

  // stage 2: inverse index lookup, zero substitution
  logic [7:0] rom_d;
  logic [8:0] s2_prod;

  d1_rom u_rom (.a(s1_idx), .d(rom_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_prod <= 9'h100;
    else        s2_prod <= s1_zero ? 9'h100 : {1'b0, rom_d};
  end

  // stage 3: diminished-1 accumulation, deferred end-around carry
  logic [9:0] t;
  logic       t_cout;     // always 0: the sum is at most 512

  emodl_adder #(.W(10)) u_aadd (
    .a({1'b0, acc_in.p}), .b({1'b0, s2_prod}), .cin(~acc_in.carry),
    .sum(t), .cout(t_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc_out <= D1_ZERO;
    else begin
      acc_out.p     <= {t[9], t[7:0]};
      acc_out.carry <= t[9] | t[8];
    end
  end

  // a partial sum never exceeds 256, and 256 only comes with the carry set
  a_acc_in_code: assert property (@(posedge clk) disable iff (!rst_n)
    (acc_in.p <= 9'h100) && ((acc_in.p != 9'h100) || acc_in.carry));
endmodule
