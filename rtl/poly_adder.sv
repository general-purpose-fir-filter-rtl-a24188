// poly_adder: binary accumulation of the terms that the enhanced mapping
// moves outside the modular ring.
//
// With a sample written a3*X^3 + A(X) and a coefficient b3*X^3 + B(X),
//   (a3*X^3 + A)(b3*X^3 + B) = a3*b3*X^6 + X^3*(a3*B + b3*A) + A*B.
// The A*B part is computed by the Fermat ALUs; this block sums the rest
// over the taps. Because a3 and b3 are -1, 0 or +1 every product is a
// sign change, so each tap only adds or subtracts digits. Like the ALU
// rows it is a transposed chain: tap k adds a3*B_k + b3_k*A and a3*b3_k
// to the partial sums arriving from tap k+1, and the sums leave at tap 0.
// corr[j] is the coefficient of X^(3+j) (j = 0..2), z6 that of X^6.
//
// The split of eq. (4) and its summation in ordinary binary, with the same
// adder cells as the ALUs, follow the document. The transposed arrangement, matching the ALU rows, is this
// design's choice. Latency: a sample presented in cycle t is in the outputs
// after the edge ending cycle t.
module poly_adder
  import fir_pkg::*;
#(
  parameter int unsigned N_TAPS = 53
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  epoly_t                     x,              // current sample
  input  epoly_t                     coef [N_TAPS],  // h[k]
  output logic signed [CORR_W-1:0]   corr [NDIG],
  output logic signed [CORR_W-1:0]   z6
);
  typedef struct packed {
    logic signed [NDIG-1:0][CORR_W-1:0] c;
    logic signed [CORR_W-1:0]           z;
  } psum_t;

  psum_t chain [N_TAPS+1];
  assign chain[N_TAPS] = '0;

  for (genvar k = 0; k < N_TAPS; k++) begin : g_tap
    psum_t term;
    always_comb begin
      for (int j = 0; j < NDIG; j++)
        term.c[j] = CORR_W'(int'(x.top) * int'(coef[k].dig[j])
                          + int'(coef[k].top) * int'(x.dig[j]));
      term.z = CORR_W'(int'(x.top) * int'(coef[k].top));
    end
    // one binary adder per sum, as in the rest of the design
    psum_t nxt;
    for (genvar j = 0; j <= NDIG; j++) begin : g_sum
      logic unused_cout;
      if (j < NDIG) begin : g_c
        emodl_adder #(.W(CORR_W)) u_add (
          .a(chain[k+1].c[j]), .b(term.c[j]), .cin(1'b0), .sum(nxt.c[j]), .cout(unused_cout)
        );
      end else begin : g_z
        emodl_adder #(.W(CORR_W)) u_add (
          .a(chain[k+1].z), .b(term.z), .cin(1'b0), .sum(nxt.z), .cout(unused_cout)
        );
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) chain[k] <= '0;
      else        chain[k] <= nxt;
    end
  end

  always_comb begin
    for (int j = 0; j < NDIG; j++) corr[j] = chain[0].c[j];
    z6 = chain[0].z;
  end
endmodule
