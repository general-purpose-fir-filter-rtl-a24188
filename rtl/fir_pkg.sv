// fir_pkg: constants, types and constant functions shared by the modulus-257
// replicated-polynomial FIR array.
//
// Number system. A signed sample s is written as a polynomial in X = 2^R
// (R = 3 bits per digit, NDIG = 3 digits, so |s| <= 511). The enhanced
// mapping rewrites it as a'3*X^3 + A(X) with |a'i| <= 4 and a'3 in {-1,0,1}.
// A(X)*B(X) has degree 4, so it is evaluated at NCH = 5 distinct points of
// Z_257 (the direct product ring Z_257^5) and each channel is computed on
// its own. Multiplication uses index calculus: a non-zero residue v is kept
// as its discrete logarithm to the primitive root G, and products are
// accumulated in diminished-1 form (v-1, with 9'h100 standing for zero).
//
// The modulus 257, X = 2^3, five channels, the 128x8 half ROM and the
// diminished-1 accumulation follow the document. The primitive root 3 and
// the evaluation points {0, 1, -1, 2, -2} are this design's own choices.
package fir_pkg;

  localparam int unsigned M      = 257;  // computational modulus
  localparam int unsigned R      = 3;    // bits per polynomial digit, X = 2^R
  localparam int unsigned NDIG   = 3;    // digits of the simple map (degree 2)
  localparam int unsigned NCH    = 5;    // channels = degree of A*B + 1
  localparam int unsigned G      = 3;    // primitive root of Z_257
  localparam int unsigned SAMP_W = R*NDIG + 1;  // two's complement sample width
  localparam int unsigned DIG_W  = 4;    // signed enhanced digit, range [-4,4]
  localparam int unsigned RES_W  = 9;    // residue 0..256
  localparam int unsigned COEF_W = 9;    // centred output coefficient [-128,128]
  localparam int unsigned Y_W    = 25;   // output word, weights 2^0 .. 2^24
  localparam int unsigned CORR_W = 16;   // poly_adder sums (N_TAPS <= 4095)

  // Evaluation points of the forward map, as residues mod 257.
  localparam int unsigned PT [NCH] = '{0, 1, M-1, 2, M-2};

  typedef logic signed [DIG_W-1:0] digit_t;
  typedef logic signed [1:0]       top_t;     // a'3 in {-1,0,1}

  // Enhanced polynomial of one sample: a'3*X^3 + a'2*X^2 + a'1*X + a'0.
  typedef struct packed {
    top_t            top;
    digit_t [NDIG-1:0] dig;
  } epoly_t;

  // A residue in index form: zero flag ("NAN") and discrete log to base G.
  typedef struct packed {
    logic       nan;
    logic [7:0] idx;
  } index_t;

  // Diminished-1 accumulator with the end-around carry deferred to the next
  // stage: value = (p + (carry ? 0 : 1) + 1) mod 257.
  typedef struct packed {
    logic [8:0] p;
    logic       carry;
  } d1acc_t;

  localparam d1acc_t D1_ZERO = '{p: 9'h100, carry: 1'b1};

  typedef logic [7:0] rom128_t [128];
  typedef logic [7:0] logtab_t [M];
  typedef int         mat_t    [NCH*NCH];   // row-major, [r*NCH + c]

  function automatic int unsigned modmul(int unsigned a, int unsigned b);
    return (a * b) % M;
  endfunction

  function automatic int unsigned modpow(int unsigned b, int unsigned e);
    int unsigned r;
    r = 1;
    for (int unsigned i = 0; i < e; i++) r = modmul(r, b);
    return r;
  endfunction

  // Reduce any integer into 0..M-1.
  function automatic int unsigned modred(int v);
    int r;
    r = v % int'(M);
    if (r < 0) r += int'(M);
    return unsigned'(r);
  endfunction

  // d1_rom contents: diminished-1 form of G^i for i = 0..127.
  function automatic rom128_t half_rom();
    rom128_t t;
    int unsigned v = 1;
    for (int i = 0; i < 128; i++) begin
      t[i] = 8'(v - 1);
      v = modmul(v, G);
    end
    return t;
  endfunction

  // index_mapper contents: discrete log of every non-zero residue.
  function automatic logtab_t log_table();
    logtab_t t;
    int unsigned v = 1;
    t[0] = 8'd0;
    for (int i = 0; i < 256; i++) begin
      t[v] = 8'(i);
      v = modmul(v, G);
    end
    return t;
  endfunction

  // Inverse of the Vandermonde matrix V[k][j] = PT[k]^j mod M, by
  // Gauss-Jordan elimination over Z_M. No pivoting is needed: every leading
  // minor of V is itself a Vandermonde determinant of distinct points.
  // inv[j*NCH+k] maps channel k to polynomial coefficient j.
  function automatic mat_t vandermonde_inverse();
    mat_t a, inv;
    int   f, fr;
    for (int k = 0; k < NCH; k++)
      for (int j = 0; j < NCH; j++) begin
        a[k*NCH+j]   = int'(modpow(PT[k], j));
        inv[k*NCH+j] = (k == j) ? 1 : 0;
      end
    for (int c = 0; c < NCH; c++) begin
      f = int'(modpow(unsigned'(a[c*NCH+c]), M - 2));  // Fermat inverse
      for (int j = 0; j < NCH; j++) begin
        a[c*NCH+j]   = int'(modmul(unsigned'(a[c*NCH+j]), f));
        inv[c*NCH+j] = int'(modmul(unsigned'(inv[c*NCH+j]), f));
      end
      for (int r = 0; r < NCH; r++) begin
        if (r != c) begin
          fr = a[r*NCH+c];
          for (int j = 0; j < NCH; j++) begin
            a[r*NCH+j]   = int'(modred(a[r*NCH+j]   - fr * a[c*NCH+j]));
            inv[r*NCH+j] = int'(modred(inv[r*NCH+j] - fr * inv[c*NCH+j]));
          end
        end
      end
    end
    return inv;
  endfunction

  // Residue of the polynomial with digits dig evaluated at point pt.
  function automatic int unsigned eval_point(digit_t [NDIG-1:0] dig, int unsigned pt);
    int acc = 0;
    for (int j = 0; j < NDIG; j++) acc += int'(dig[j]) * int'(modpow(pt, j));
    return modred(acc);
  endfunction

endpackage
