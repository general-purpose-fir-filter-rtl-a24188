// tb_fir_workload: the 53-tap filter on a signal-processing load.
//
// Taps: a Hamming-windowed sinc low-pass (cut-off 0.15 of the sample rate),
// h[k] = round(A * w[k] * sinc(0.3*(k-26))), scaled so the largest tap is
// 511. Input: two tones, 0.03 and 0.37 of the sample rate, amplitude 255
// each, rounded to integers. 600 samples are streamed one per clock. Every
// output must equal the reference that wraps modular product coefficients
// the way the hardware does; outputs whose coefficients did not wrap must
// equal the exact convolution. The run also reports how many outputs
// wrapped, and how many would have wrapped with the simple (non-redundant)
// digit split, whose digits reach +-7 instead of +-4.
module tb_fir_workload;
  import fir_pkg::*;
  import fir_ref_pkg::*;

  localparam int NT = 53;
  localparam int NS = 600;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic x_valid = 0, coef_we = 0, y_valid;
  logic signed [SAMP_W-1:0] x = '0, coef = '0;
  logic [$clog2(NT)-1:0] coef_addr = '0;
  logic signed [Y_W-1:0] y;

  fir_top dut (.clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x(x),
               .coef_we(coef_we), .coef_addr(coef_addr), .coef(coef),
               .y_valid(y_valid), .y(y));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_wrap = 0, n_wrap_simple = 0, n_out = 0;
  int h [NT];
  int xs [NS];

  // would the simple split (sign-magnitude digits 0..7) wrap for output n?
  function automatic bit simple_wraps(int n);
    longint c [5];
    foreach (c[i]) c[i] = 0;
    for (int k = 0; k < NT && n - k >= 0; k++) begin
      int hm, xm, hs, xsg;
      hs  = (h[k] < 0) ? -1 : 1;       hm = (h[k] < 0) ? -h[k] : h[k];
      xsg = (xs[n-k] < 0) ? -1 : 1;    xm = (xs[n-k] < 0) ? -xs[n-k] : xs[n-k];
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          begin
            int p;
            p = hs * xsg * ((hm >> (3 * j)) & 7) * ((xm >> (3 * i)) & 7);
            c[i + j] += longint'(p);
          end
    end
    foreach (c[i]) if (c[i] > 128 || c[i] < -128) return 1;
    return 0;
  endfunction

  int outn = 0;
  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      automatic int hh [] = new[NT];
      automatic int xv [] = new[NT];
      longint e, ex;
      bit w;
      ex = 0;
      for (int k = 0; k < NT; k++) begin
        hh[k] = h[k];
        xv[k] = (outn - k >= 0) ? xs[outn - k] : 0;
        ex += longint'(hh[k]) * xv[k];
      end
      e = model(hh, xv, w);
      checks++;
      if (longint'(y) != e) begin
        failures++;
        if (failures < 10) $display("FAIL sample %0d: y=%0d expected %0d", outn, y, e);
      end
      if (w) n_wrap++;
      else begin
        checks++;
        if (longint'(y) != ex) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d: y=%0d exact %0d", outn, y, ex);
        end
      end
      if (simple_wraps(outn)) n_wrap_simple++;
      n_out++;
      outn++;
    end
  end

  initial begin
    real hr [NT];
    real mx;
    mx = 0.0;
    for (int k = 0; k < NT; k++) begin
      real t, s, w;
      t = real'(k - (NT - 1) / 2);
      s = (t == 0.0) ? 0.3 : $sin(PI * 0.3 * t) / (PI * t);
      w = 0.54 - 0.46 * $cos(2.0 * PI * real'(k) / real'(NT - 1));
      hr[k] = s * w;
      if (hr[k] > mx) mx = hr[k];
    end
    for (int k = 0; k < NT; k++) h[k] = int'($rtoi(511.0 * hr[k] / mx + ((hr[k] >= 0.0) ? 0.5 : -0.5)));
    for (int n = 0; n < NS; n++)
      xs[n] = int'($rtoi(255.0 * $sin(2.0 * PI * 0.03 * real'(n)) + 255.0 * $sin(2.0 * PI * 0.37 * real'(n)) + 511.5)) - 511;

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NT; k++) begin
      coef_we = 1; coef_addr = $bits(coef_addr)'(k); coef = SAMP_W'(h[k]);
      @(negedge clk);
    end
    coef_we = 0;
    repeat (3) @(negedge clk);
    for (int n = 0; n < NS; n++) begin
      x_valid = 1; x = SAMP_W'(xs[n]);
      @(negedge clk);
    end
    x_valid = 0;
    repeat (12) @(negedge clk);
    checks++;
    if (n_out != NS) begin
      failures++;
      $display("FAIL %0d outputs for %0d samples", n_out, NS);
    end
    $display("workload: %0d outputs, %0d wrapped with the redundant mapping, %0d would wrap with the simple split",
             n_out, n_wrap, n_wrap_simple);
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
