// arith_path: the arithmetic path, NCH = 5 channels by N_TAPS Fermat ALUs.
//
// Each channel is a transposed-form FIR row: the index of the current
// sample is broadcast to every cell of the row, cell k holds the index of
// coefficient h[k], and partial sums travel from cell N_TAPS-1 towards cell
// 0 through the registered accumulators, with the deferred carry between
// neighbours. The last cell starts from the diminished-1 zero. The output
// of cell 0 after a sample's products have been added is
// sum_k h[k] * x[n-k] in that channel, still in deferred-carry form.
// The channels share nothing and are identical.
//
// The 5 x N grid of identical ALUs with chained accumulators follows the
// document; the transposed (broadcast input) arrangement is this design's
// choice. Latency: a sample index presented in cycle t is in acc after the
// edge ending cycle t+2.
module arith_path
  import fir_pkg::*;
#(
  parameter int unsigned N_TAPS = 53
) (
  input  logic   clk,
  input  logic   rst_n,
  input  index_t x_ix    [NCH],          // current sample, per channel
  input  index_t coef_ix [N_TAPS][NCH],  // coefficients, per tap and channel
  output d1acc_t acc     [NCH]           // channel sums, deferred-carry form
);
  for (genvar ch = 0; ch < NCH; ch++) begin : g_ch
    d1acc_t chain [N_TAPS+1];
    assign chain[N_TAPS] = D1_ZERO;
    for (genvar k = 0; k < N_TAPS; k++) begin : g_tap
      fermat_alu u_alu (
        .clk    (clk),
        .rst_n  (rst_n),
        .a      (x_ix[ch]),
        .b      (coef_ix[k][ch]),
        .acc_in (chain[k+1]),
        .acc_out(chain[k])
      );
    end
    assign acc[ch] = chain[0];
  end
endmodule
