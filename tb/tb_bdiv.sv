// tb_bdiv: self-checking testbench for bdiv.
// For pairs inside the bipolar divider's range (|2P_Y-1| <= |2P_X-1|,
// |2P_X-1| >= 0.4) the divider gets random uncorrelated 2^K-bit streams and
// three independent 0.5 streams; the bipolar value of the quotient, 2P_Z-1,
// must be close to (2P_Y-1)/(2P_X-1) at each point, and the mean squared
// error over all points must be small. 1024-bit streams.
module tb_bdiv;

  localparam int unsigned K = 10;
  localparam int unsigned N = 1 << K;
  localparam real TOL = 0.6;
  localparam real MSE_MAX = 0.06;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic en = 1'b0;
  logic x = 1'b0, y = 1'b0;
  logic [2:0] half = '0;
  logic z;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  bdiv #(.K(K), .SEED(K'(10'h1A7))) dut (.clk, .rst_n, .clear, .en, .x, .y, .half, .z);

  function automatic logic bern(input real p);
    return $urandom_range(0, 65535) < int'(p * 65536.0);
  endfunction

  real sq_sum = 0.0;
  int  npts = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    for (int ix = 0; ix <= 10; ix++) begin
      for (int iy = 0; iy <= 10; iy++) begin
        real px, py, bx, by, bz, bexp, err;
        int ones;
        px = ix / 10.0; py = iy / 10.0;
        bx = 2.0 * px - 1.0; by = 2.0 * py - 1.0;
        if ((bx < 0 ? -bx : bx) < 0.39 || (by < 0 ? -by : by) > (bx < 0 ? -bx : bx) + 1e-9) continue;
        clear = 1'b1; @(negedge clk); clear = 1'b0;
        ones = 0;
        for (int unsigned t = 0; t < N; t++) begin
          x = bern(px); y = bern(py);
          half = {bern(0.5), bern(0.5), bern(0.5)};
          #1 ones += z;
          @(negedge clk);
        end
        bz = 2.0 * ones / N - 1.0;
        bexp = by / bx;
        err = bz - bexp;
        sq_sum += err * err;
        npts++;
        checks++;
        if (err > TOL || err < -TOL) begin
          failures++;
          $display("px=%0.2f py=%0.2f: 2Pz-1=%0.4f expected %0.4f", px, py, bz, bexp);
        end
      end
    end
    $display("bdiv MSE over %0d points, %0d-bit streams: %0.6f", npts, N, sq_sum / npts);
    checks++;
    if (sq_sum / npts > MSE_MAX) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (130 * (N + 1)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
