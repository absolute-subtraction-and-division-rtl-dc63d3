// tb_ucasub: self-checking testbench for ucasub.
// Part 1, cycle-exact: a reference model in the testbench keeps its own
// running difference d of the input streams (saturating at the counter's
// range) and its own copy of the LFSR sequence, and predicts every output
// bit as (d >= 0 ? d : -d-1) > LFSR. Random streams, saturation at both ends
// and the clear input are exercised.
// Part 2, accuracy: for a grid of (P_X, P_Y) with random uncorrelated
// 2^K-bit streams the fraction of 1s must be close to 0.5|P_X-P_Y|; the
// mean squared error over the grid is checked too.
module tb_ucasub;

  localparam int unsigned K = 8;
  localparam int unsigned N = 1 << K;
  localparam logic [K-1:0] SEED = K'(8'h9B);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic en = 1'b0;
  logic x = 1'b0, y = 1'b0;
  logic z;
  logic [K-1:0] ref_rnd;
  int   checks = 0;
  int   failures = 0;
  int   d;          // reference count minus 2^K
  int   bit_errs = 0;

  always #5 clk = ~clk;

  ucasub #(.K(K), .SEED(SEED), .ALT_POLY(1'b0)) dut (.clk, .rst_n, .clear, .en, .x, .y, .z);

  // Second LFSR, same seed and polynomial, as the source of the reference's
  // random numbers.
  lfsr #(.K(K), .SEED(SEED), .ALT_POLY(1'b0)) ref_lfsr (.clk, .rst_n, .en, .q(ref_rnd));

  function automatic logic predict(input int dd, input logic [K-1:0] r);
    int unsigned mag;
    mag = (dd >= 0) ? dd : -dd - 1;
    return mag > r;
  endfunction

  // Reference counter.
  always @(posedge clk) begin
    if (!rst_n || clear) d <= 0;
    else if (en) begin
      if (x && !y && d < int'(N) - 1) d <= d + 1;
      else if (!x && y && d > -int'(N)) d <= d - 1;
    end
  end

  function automatic logic bern(input int unsigned thr16);
    return $urandom_range(0, 65535) < thr16;
  endfunction

  // Apply one cycle of inputs, compare the output before the clock edge.
  task automatic step(input logic xi, input logic yi);
    x = xi; y = yi;
    #1;
    checks++;
    if (z !== predict(d, ref_rnd)) begin
      failures++;
      if (bit_errs++ < 10) $display("t=%0t d=%0d rnd=%0d z=%0b", $time, d, ref_rnd, z);
    end
    @(negedge clk);
  endtask

  real sq_sum = 0.0;
  int  npts = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // --- part 1: exact behaviour
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    en = 1'b1;
    repeat (3 * N) step(bern(40000), bern(25000));
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    repeat (3 * N) step(bern(15000), bern(50000));
    // run into the top of the counter and stay there
    repeat (N + 20) step(1'b1, 1'b0);
    // and all the way down to zero
    repeat (2 * N + 20) step(1'b0, 1'b1);
    // equal inputs leave the count alone
    repeat (50) step(1'b1, 1'b1);
    repeat (50) step(1'b0, 1'b0);
    // en low: no counting
    en = 1'b0;
    repeat (20) step(1'b1, 1'b0);
    en = 1'b1;
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    checks++;
    if (d != 0) failures++;
    repeat (N) step(bern(32768), bern(32768));

    // --- part 2: accuracy over full streams
    for (int ix = 0; ix <= 10; ix += 2) begin
      for (int iy = 0; iy <= 10; iy += 5) begin
        real px, py, pz, expect_pz, err;
        int ones;
        px = ix / 10.0; py = iy / 10.0;
        clear = 1'b1; @(negedge clk); clear = 1'b0;
        ones = 0;
        for (int unsigned t = 0; t < N; t++) begin
          x = bern(int'(px * 65536.0)); y = bern(int'(py * 65536.0));
          #1 ones += z;
          @(negedge clk);
        end
        pz = real'(ones) / N;
        expect_pz = 0.5 * ((px > py) ? px - py : py - px);
        err = pz - expect_pz;
        sq_sum += err * err;
        npts++;
        checks++;
        if (err > 0.06 || err < -0.06) begin
          failures++;
          $display("accuracy: px=%0.2f py=%0.2f pz=%0.4f expected %0.4f", px, py, pz, expect_pz);
        end
      end
    end
    checks++;
    $display("ucasub MSE over %0d points, %0d-bit streams: %0.6f", npts, N, sq_sum / npts);
    if (sq_sum / npts > 0.001) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
