// tb_fir_top: the complete filter at its default size (53 taps).
//
// Phases, one sample per clock throughout:
//   A. coefficients and samples of small magnitude: no modular coefficient
//      can leave -128..128, so every output must equal the exact integer FIR;
//   B. full-range random coefficients and samples: modular wrap (the
//      overflow the redundant mapping makes less likely) occurs, and every
//      output must equal the reference that wraps each product coefficient
//      the same way;
//   C. coefficients rewritten one per cycle while samples keep flowing,
//      with gaps in x_valid; the reference uses, for each tap, the
//      coefficient in force when that sample reached the array.
// Also checks the 7-cycle latency from x_valid to y_valid and counts how
// often each mechanism occurred (zero operands, top digit a3/b3 set,
// modular wrap, invalid samples, coefficient writes under traffic); one
// that never occurred is a failure.
module tb_fir_top;
  import fir_pkg::*;
  import fir_ref_pkg::*;

  localparam int NT  = 53;
  localparam int LAT = 7;

  logic clk = 0, rst_n = 0;
  logic x_valid = 0, coef_we = 0, y_valid;
  logic signed [SAMP_W-1:0] x = '0, coef = '0;
  logic [$clog2(NT)-1:0] coef_addr = '0;
  logic signed [Y_W-1:0] y;

  fir_top dut (.clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x(x),
               .coef_we(coef_we), .coef_addr(coef_addr), .coef(coef),
               .y_valid(y_valid), .y(y));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_zero = 0, n_top = 0, n_wrap = 0, n_invalid = 0, n_reload = 0, n_exact = 0;

  int shadow [NT];
  int xs     [$];        // sample value per cycle (0 when invalid)
  int snaps  [$][NT];    // coefficients in force for that cycle's sample
  bit vld    [$];
  int cyc = 0;
  int first_x = -1, first_y = -1;

  function automatic int rnd(int lim);
    return int'($urandom_range(2 * lim)) - lim;
  endfunction

  // One clock cycle: drive the sample and an optional write, then advance.
  task automatic step(bit v, int xv, bit we, int addr, int cv);
    x_valid   = v;
    x         = SAMP_W'(xv);
    coef_we   = we;
    coef_addr = $bits(coef_addr)'(addr);
    coef      = SAMP_W'(cv);
    if (v && first_x < 0) first_x = cyc;
    xs.push_back(v ? xv : 0);
    vld.push_back(v);
    if (!v) n_invalid++;
    if (v && xv == 0) n_zero++;
    // a write in this cycle is seen by the sample of the previous cycle
    if (we) shadow[addr] = cv;
    if (cyc > 0) snaps.push_back(shadow);
    @(negedge clk);
    cyc++;
  endtask

  // Reference output for the sample of cycle n.
  function automatic longint ref_out(int n, output bit wrapped, output longint exact);
    int h [] = new[NT];
    int xv [] = new[NT];
    exact = 0;
    for (int k = 0; k < NT; k++) begin
      if (n - k >= 0) begin h[k] = snaps[n - k][k]; xv[k] = xs[n - k]; end
      else            begin h[k] = 0;               xv[k] = 0;         end
      exact += longint'(h[k]) * xv[k];
    end
    return model(h, xv, wrapped);
  endfunction

  // output checker: y_valid tags the sample of cycle (now - LAT)
  int outn = 0;
  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      if (first_y < 0) first_y = cyc;
      while (outn < xs.size() && !vld[outn]) outn++;
      if (outn < snaps.size()) begin
        bit w;
        longint e, ex;
        e = ref_out(outn, w, ex);
        checks++;
        if (w) n_wrap++;
        if (longint'(y) != e) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d: y=%0d expected %0d", outn, y, e);
        end
        if (!w) begin
          n_exact++;
          checks++;
          if (longint'(y) != ex) begin
            failures++;
            if (failures < 10) $display("FAIL sample %0d: y=%0d exact FIR %0d", outn, y, ex);
          end
        end
      end
      outn++;
    end
  end

  function automatic bit has_top(int v);
    int d [3];
    int t;
    emap(v, d, t);
    return t != 0;
  endfunction

  initial begin
    foreach (shadow[k]) shadow[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // load small coefficients (phase A), no samples yet
    for (int k = 0; k < NT; k++) begin
      int cv;
      cv = (k % 9 == 4) ? 0 : rnd(3);
      if (cv == 0) n_zero++;
      step(0, 0, 1, k, cv);
    end
    // drop the loading cycles from the invalid count; they carry no samples
    n_invalid = 0;
    // phase A: small samples, outputs exact
    for (int i = 0; i < 200; i++) step(1, (i % 17 == 0) ? 0 : rnd(3), 0, 0, 0);

    // phase B: full-range coefficients (with top digits) loaded under traffic
    for (int k = 0; k < NT; k++) begin
      int cv;
      cv = (k % 11 == 0) ? 0 : rnd(511);
      if (has_top(cv)) n_top++;
      n_reload++;
      step(1, rnd(511), 1, k, cv);
    end
    for (int i = 0; i < 400; i++) begin
      int xv;
      xv = (i % 23 == 0) ? 0 : rnd(511);
      if (has_top(xv)) n_top++;
      step(1, xv, 0, 0, 0);
    end

    // phase C: reload taps with mid-range values, gaps in x_valid
    for (int i = 0; i < 300; i++) begin
      bit we;
      we = (i % 3 == 0);
      if (we) n_reload++;
      step((i % 13) != 5, rnd(200), we, int'($urandom_range(NT - 1)), rnd(100));
    end
    // drain
    for (int i = 0; i < NT + LAT + 2; i++) step(1, 0, 0, 0, 0);

    if (first_y - first_x != LAT) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", first_y - first_x, LAT);
    end
    checks++;
    $display("mechanisms: zero operands %0d, top digit set %0d, modular wrap %0d, invalid samples %0d, coefficient writes under traffic %0d, exact outputs %0d",
             n_zero, n_top, n_wrap, n_invalid, n_reload, n_exact);
    if (n_zero == 0 || n_top == 0 || n_wrap == 0 || n_invalid == 0 || n_reload == 0 || n_exact == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
