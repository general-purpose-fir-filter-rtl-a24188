// fir_top: N_TAPS-tap FIR filter computed over five copies of Z_257.
//
// y[n] = sum_{k=0}^{N_TAPS-1} h[k] * x[n-k] for 10-bit samples and
// coefficients (range -511..511) and a 25-bit result, using only 8-bit
// modulo-257 arithmetic in the filter array.
//
// Data path, one sample per clock:
//   1. input_mapper rewrites the sample as a3*X^3 + A(X), X = 8, digits of
//      A in -4..4 and a3 in -1..1 (registered);
//   2. forward_map evaluates A at five points of Z_257 and index_mapper
//      turns each residue into index form (registered);
//   3. arith_path: five rows of N_TAPS Fermat ALUs accumulate A*B_k per
//      channel in transposed form (3 register stages);
//      poly_adder accumulates the X^3..X^6 terms of a3, b3 in binary; it
//      reads the coefficients in the same cycle as the ALUs' first stage,
//      and its sums are delayed two cycles to line up with the ALU rows;
//   4. inverse_map recovers the coefficients of sum A*B_k (registered);
//   5. csa_reconstruct evaluates everything at X = 8 (registered output).
// Coefficients are written one at a time through coef_we/coef_addr/coef;
// a second mapper chain converts them to the same forms, held in registers.
// A write to tap k in cycle w is used for every sample presented in cycle
// w-1 or later (taps are read when the sample reaches the ALU rows, two
// cycles after it is presented), so an output during a reload mixes old and
// new taps exactly as a transposed FIR does. Reset clears all coefficients
// to zero.
//
// Interface: x_valid tags x; a sample with x_valid low is taken as zero,
// since the array consumes one sample every clock. y_valid is x_valid
// delayed by LATENCY = 7 cycles, y the output for that sample. The result is
// exact while every coefficient of sum_k A_k*B_k stays within -128..128 after
// the enhanced mapping; beyond that the modular channels wrap.
//
// The structure (forward map, 5 x N ALU array, inverse map, polynomial
// adder, CSA reconstruction), the modulus, X = 8 and 53 taps follow the
// document; the pipeline cut, the coefficient-load port and the handling of
// x_valid are this design's own choices.
module fir_top
  import fir_pkg::*;
#(
  parameter int unsigned N_TAPS = 53,
  localparam int unsigned AW    = (N_TAPS > 1) ? $clog2(N_TAPS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     x_valid,
  input  logic signed [SAMP_W-1:0] x,
  input  logic                     coef_we,
  input  logic [AW-1:0]            coef_addr,
  input  logic signed [SAMP_W-1:0] coef,
  output logic                     y_valid,
  output logic signed [Y_W-1:0]    y
);
  localparam int unsigned LATENCY = 7;

  // ---------------- coefficient mapping and storage ----------------
  epoly_t                      cpoly_w;
  logic [NCH-1:0][RES_W-1:0]   cres_w;
  index_t                      cix_w   [NCH];
  epoly_t                      coef_poly [N_TAPS];
  index_t                      coef_ix   [N_TAPS][NCH];

  input_mapper u_cmap (.sample(coef), .poly(cpoly_w));
  forward_map  u_cfwd (.dig(cpoly_w.dig), .res(cres_w));
  for (genvar ch = 0; ch < NCH; ch++) begin : g_cix
    index_mapper u_cix (.res(cres_w[ch]), .ix(cix_w[ch]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_TAPS; k++) begin
        coef_poly[k] <= '0;
        for (int ch = 0; ch < NCH; ch++) coef_ix[k][ch] <= '{nan: 1'b1, idx: 8'd0};
      end
    end else if (coef_we && (int'(coef_addr) < N_TAPS)) begin
      coef_poly[coef_addr] <= cpoly_w;
      for (int ch = 0; ch < NCH; ch++) coef_ix[coef_addr][ch] <= cix_w[ch];
    end
  end

  // ---------------- sample path ----------------
  epoly_t                      xpoly_w;
  epoly_t                      xpoly_q, xpoly_f;
  logic [NCH-1:0][RES_W-1:0]   xres_w;
  index_t                      xix_w [NCH];
  index_t                      xix_q [NCH];
  logic [LATENCY-1:0]          vpipe;

  input_mapper u_xmap (.sample(x_valid ? x : '0), .poly(xpoly_w));
  forward_map  u_xfwd (.dig(xpoly_q.dig), .res(xres_w));
  for (genvar ch = 0; ch < NCH; ch++) begin : g_xix
    index_mapper u_xix (.res(xres_w[ch]), .ix(xix_w[ch]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xpoly_q  <= '0;
      xpoly_f  <= '0;
      for (int ch = 0; ch < NCH; ch++) xix_q[ch] <= '{nan: 1'b1, idx: 8'd0};
      vpipe    <= '0;
    end else begin
      xpoly_q  <= xpoly_w;
      xpoly_f  <= xpoly_q;
      xix_q    <= xix_w;
      vpipe    <= {vpipe[LATENCY-2:0], x_valid};
    end
  end

  // ---------------- modular array and binary correction ----------------
  d1acc_t                    acc [NCH];
  logic signed [CORR_W-1:0]  corr [NDIG];
  logic signed [CORR_W-1:0]  z6;
  logic signed [CORR_W-1:0]  corr_d [2][NDIG];  // match ALU stages 1 and 2
  logic signed [CORR_W-1:0]  z6_d   [2];

  arith_path #(.N_TAPS(N_TAPS)) u_arith (
    .clk(clk), .rst_n(rst_n), .x_ix(xix_q), .coef_ix(coef_ix), .acc(acc)
  );

  poly_adder #(.N_TAPS(N_TAPS)) u_padd (
    .clk(clk), .rst_n(rst_n), .x(xpoly_f), .coef(coef_poly), .corr(corr), .z6(z6)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < 2; d++) begin
        for (int j = 0; j < NDIG; j++) corr_d[d][j] <= '0;
        z6_d[d] <= '0;
      end
    end else begin
      corr_d[0] <= corr;
      corr_d[1] <= corr_d[0];
      z6_d[0]   <= z6;
      z6_d[1]   <= z6_d[0];
    end
  end

  // ---------------- inverse map and reconstruction ----------------
  logic signed [COEF_W-1:0] cw   [NCH];
  logic signed [COEF_W-1:0] cq   [NCH];
  logic signed [CORR_W-1:0] corr_q [NDIG];
  logic signed [CORR_W-1:0] z6_q;
  logic signed [Y_W-1:0]    y_w;

  inverse_map u_inv (.acc(acc), .coef(cw));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCH; i++)  cq[i]     <= '0;
      for (int j = 0; j < NDIG; j++) corr_q[j] <= '0;
      z6_q <= '0;
    end else begin
      cq     <= cw;
      corr_q <= corr_d[1];
      z6_q   <= z6_d[1];
    end
  end

  csa_reconstruct u_csa (.coef(cq), .corr(corr_q), .z6(z6_q), .y(y_w));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= y_w;
  end

  assign y_valid = vpipe[LATENCY-1];

  // writes must address an existing tap
  a_coef_addr: assert property (@(posedge clk) disable iff (!rst_n)
    coef_we |-> (int'(coef_addr) < N_TAPS));
endmodule
