// tb_accuracy: accuracy sweep of the four circuits, the experiments by which
// the method is judged.
//  1. Mean squared error against stream length 2^3 .. 2^10 for the bipolar
//     absolute subtractor and both dividers, over random input pairs
//     (acc_sweep, one instance per length). Checks: the error at 1024 bits
//     is below a bound and well below the error at 8 bits.
//  2. UCASub, 1024-bit streams: for P_X = 0, 0.1, .., 1 and random P_Y, the
//     MSE of P_Z against 0.5|P_X-P_Y|. Check: every value below a bound.
//  3. Bipolar absolute subtractor, 256-bit streams: the same per-P_X table.
// All numbers are printed. The pair count is reduced from 1000 to keep the
// run short.
module tb_accuracy;

  localparam int unsigned KMIN = 3;
  localparam int unsigned KMAX = 10;
  localparam int unsigned PAIRS = 200;
  localparam int unsigned SAMPLES = 60;   // random P_Y per P_X in 2. and 3.

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  function automatic logic bern(input real p);
    return $urandom_range(0, 65535) < int'(p * 65536.0);
  endfunction

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  // ------------------------------------------------- 1. MSE against length
  logic done_k [KMIN:KMAX];
  real  mse_a [KMIN:KMAX];
  real  mse_u [KMIN:KMAX];
  real  mse_b [KMIN:KMAX];

  for (genvar k = KMIN; k <= KMAX; k++) begin : g_len
    acc_sweep #(.K(k), .PAIRS(PAIRS)) u_sweep (
      .clk, .rst_n, .done(done_k[k]), .mse_basub(mse_a[k]), .mse_udiv(mse_u[k]), .mse_bdiv(mse_b[k]));
  end

  // ------------------------------------------------- 2. UCASub table, 1024 bits
  localparam int unsigned K1 = 10;
  logic u_clear = 1'b0, u_x = 1'b0, u_y = 1'b0, u_z;
  real  tab1 [11];
  bit   done1 = 1'b0;

  ucasub #(.K(K1), .SEED(K1'(99)), .ALT_POLY(1'b0)) u_ucasub (
    .clk, .rst_n, .clear(u_clear), .en(1'b1), .x(u_x), .y(u_y), .z(u_z));

  initial begin
    wait (rst_n);
    @(negedge clk);
    for (int i = 0; i <= 10; i++) begin
      real px, py, s;
      int ones;
      px = i / 10.0;
      s = 0.0;
      for (int n = 0; n < SAMPLES; n++) begin
        py = $urandom_range(0, 1000) / 1000.0;
        u_clear = 1'b1; @(negedge clk); u_clear = 1'b0;
        ones = 0;
        for (int t = 0; t < (1 << K1); t++) begin
          u_x = bern(px); u_y = bern(py);
          #1 ones += u_z;
          @(negedge clk);
        end
        s += (real'(ones) / (1 << K1) - 0.5 * absr(px - py)) ** 2;
      end
      tab1[i] = s / SAMPLES;
    end
    done1 = 1'b1;
  end

  // ------------------------------------------------- 3. bipolar table, 256 bits
  localparam int unsigned K2 = 8;
  logic b_clear = 1'b0, b_x = 1'b0, b_y = 1'b0, b_h = 1'b0, b_z;
  real  tab2 [11];
  bit   done2 = 1'b0;

  basub #(.K(K2), .SEED(K2'(77)), .ALT_POLY(1'b1)) u_basub (
    .clk, .rst_n, .clear(b_clear), .en(1'b1), .x(b_x), .y(b_y), .half(b_h), .z(b_z));

  initial begin
    wait (rst_n);
    @(negedge clk);
    for (int i = 0; i <= 10; i++) begin
      real px, py, s;
      int ones;
      px = i / 10.0;
      s = 0.0;
      for (int n = 0; n < SAMPLES; n++) begin
        py = $urandom_range(0, 1000) / 1000.0;
        b_clear = 1'b1; @(negedge clk); b_clear = 1'b0;
        ones = 0;
        for (int t = 0; t < (1 << K2); t++) begin
          b_x = bern(px); b_y = bern(py); b_h = bern(0.5);
          #1 ones += b_z;
          @(negedge clk);
        end
        s += (2.0 * ones / (1 << K2) - 1.0 - absr(px - py)) ** 2;
      end
      tab2[i] = s / SAMPLES;
    end
    done2 = 1'b1;
  end

  // ------------------------------------------------- report and checks
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done1 && done2);
    for (int k = KMIN; k <= KMAX; k++) wait (done_k[k]);
    $display("stream length   MSE basub   MSE udiv   MSE bdiv");
    for (int k = KMIN; k <= KMAX; k++)
      $display("%13d   %9.5f   %8.5f   %8.5f", 1 << k, mse_a[k], mse_u[k], mse_b[k]);
    $display("P_X    UCASub MSE x1e-2 (1024 bits)   bipolar subtractor MSE (256 bits)");
    for (int i = 0; i <= 10; i++)
      $display("%3.1f    %10.4f                      %8.4f", i / 10.0, tab1[i] * 100.0, tab2[i]);

    checks++; if (mse_a[KMAX] > 0.025) failures++;
    checks++; if (mse_u[KMAX] > 0.02) failures++;
    checks++; if (mse_b[KMAX] > 0.08) failures++;
    checks++; if (mse_a[KMAX] > 0.5 * mse_a[KMIN]) failures++;
    checks++; if (mse_u[KMAX] > 0.5 * mse_u[KMIN]) failures++;
    checks++; if (mse_b[KMAX] > 0.5 * mse_b[KMIN]) failures++;
    for (int i = 0; i <= 10; i++) begin
      checks++; if (tab1[i] > 0.0005) failures++;
      checks++; if (tab2[i] > 0.05) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
