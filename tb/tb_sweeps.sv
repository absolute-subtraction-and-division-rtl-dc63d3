// tb_sweeps: input sweeps of the top at its default parameters (1024-bit
// streams), one stream per point, in steps of 1/100:
//   A. P_Y in {0.3, 0.5, 0.7, 1.0}, P_X swept 0..1: UCASub and bipolar
//      absolute subtractor outputs.
//   B. P_X in {0.3, 0.5, 0.7, 1.0}, P_Y swept 0..P_X: unipolar divider.
//   C. P_X in {0, 0.25, 0.75, 1.0}, P_Y swept over the range where
//      |2P_Y-1| <= |2P_X-1|: bipolar divider.
// For each curve it prints the mean squared and the largest error against
// the ideal function, and checks the mean squared error against a bound.
module tb_sweeps;

  localparam int unsigned K = sc_pkg::DEFAULT_K;
  localparam int unsigned N = 1 << K;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [K-1:0] px = '0, py = '0;
  logic         busy, bit_valid, last;
  logic         z_uasub, z_basub, z_udiv, z_bdiv;
  int           checks = 0;
  int           failures = 0;

  always #5 clk = ~clk;

  sc_absdiv_top dut (
    .clk, .rst_n, .start, .px, .py, .busy, .bit_valid, .last,
    .z_uasub, .z_basub, .z_udiv, .z_bdiv
  );

  // Code for a probability, clipped to the K-bit range.
  function automatic logic [K-1:0] code(input real p);
    int c;
    c = int'(p * N);
    if (c > int'(N) - 1) c = N - 1;
    if (c < 0) c = 0;
    return K'(c);
  endfunction

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  // One stream; returns the fractions of 1s of the four outputs.
  task automatic stream(input logic [K-1:0] cx, input logic [K-1:0] cy,
                        output real fu, output real fb, output real fd, output real fq);
    int o_u, o_b, o_d, o_q;
    px = cx; py = cy;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    o_u = 0; o_b = 0; o_d = 0; o_q = 0;
    while (bit_valid) begin
      o_u += z_uasub; o_b += z_basub; o_d += z_udiv; o_q += z_bdiv;
      @(negedge clk);
    end
    fu = real'(o_u) / N; fb = real'(o_b) / N; fd = real'(o_d) / N; fq = real'(o_q) / N;
  endtask

  task automatic report(input string name, input real s, input int n, input real worst, input real bound);
    checks++;
    $display("%-40s points=%0d  MSE=%0.5f  max|err|=%0.3f", name, n, s / n, worst);
    if (s / n > bound) begin
      failures++;
      $display("  MSE above %0.4f", bound);
    end
  endtask

  initial begin
    real fixed [4];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // A. UCASub and bipolar absolute subtractor
    fixed = '{0.3, 0.5, 0.7, 1.0};
    foreach (fixed[c]) begin
      real su, sb, wu, wb, fu, fb, fd, fq, rx, ry, e;
      su = 0; sb = 0; wu = 0; wb = 0;
      for (int i = 0; i <= 100; i++) begin
        stream(code(i / 100.0), code(fixed[c]), fu, fb, fd, fq);
        rx = real'(code(i / 100.0)) / N; ry = real'(code(fixed[c])) / N;
        e = fu - 0.5 * absr(rx - ry); su += e * e; if (absr(e) > wu) wu = absr(e);
        e = (2.0 * fb - 1.0) - absr(rx - ry); sb += e * e; if (absr(e) > wb) wb = absr(e);
      end
      report($sformatf("UCASub, P_Y=%0.2f", fixed[c]), su, 101, wu, 0.001);
      report($sformatf("bipolar abs. subtractor, P_Y=%0.2f", fixed[c]), sb, 101, wb, 0.03);
    end

    // B. unipolar divider
    fixed = '{0.3, 0.5, 0.7, 1.0};
    foreach (fixed[c]) begin
      real s, w, fu, fb, fd, fq, rx, ry, e;
      int n;
      s = 0; w = 0; n = 0;
      for (int i = 0; i <= 100 && i / 100.0 <= fixed[c] + 1e-9; i++) begin
        stream(code(fixed[c]), code(i / 100.0), fu, fb, fd, fq);
        rx = real'(code(fixed[c])) / N; ry = real'(code(i / 100.0)) / N;
        e = fd - ry / rx; s += e * e; n++; if (absr(e) > w) w = absr(e);
      end
      report($sformatf("unipolar divider, P_X=%0.2f", fixed[c]), s, n, w, 0.02);
    end

    // C. bipolar divider
    fixed = '{0.0, 0.25, 0.75, 1.0};
    foreach (fixed[c]) begin
      real s, w, fu, fb, fd, fq, rx, ry, bx, by, e;
      int n;
      s = 0; w = 0; n = 0;
      for (int i = 0; i <= 100; i++) begin
        rx = real'(code(fixed[c])) / N; ry = real'(code(i / 100.0)) / N;
        bx = 2.0 * rx - 1.0; by = 2.0 * ry - 1.0;
        if (absr(by) > absr(bx)) continue;
        stream(code(fixed[c]), code(i / 100.0), fu, fb, fd, fq);
        e = (2.0 * fq - 1.0) - by / bx; s += e * e; n++; if (absr(e) > w) w = absr(e);
      end
      report($sformatf("bipolar divider, P_X=%0.2f", fixed[c]), s, n, w, 0.08);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1600 * (N + 2)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
