// tb_basub: self-checking testbench for basub.
// For a grid of (P_X, P_Y) the circuit gets random uncorrelated 2^K-bit
// streams and a random 0.5 stream; the bipolar value of the output,
// 2P_Z-1, must be close to 0.5|(2P_X-1)-(2P_Y-1)| at each point, and the mean
// squared error over the grid must be small. 1024-bit streams.
module tb_basub;

  localparam int unsigned K = 10;
  localparam int unsigned N = 1 << K;
  localparam real TOL = 0.4;
  localparam real MSE_MAX = 0.025;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic en = 1'b0;
  logic x = 1'b0, y = 1'b0, half = 1'b0;
  logic z;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  basub #(.K(K), .SEED(K'(10'h16B)), .ALT_POLY(1'b1)) dut (.clk, .rst_n, .clear, .en, .x, .y, .half, .z);

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
      for (int iy = 0; iy <= 10; iy += 2) begin
        real px, py, bz, bexp, err;
        int ones;
        px = ix / 10.0; py = iy / 10.0;
        clear = 1'b1; @(negedge clk); clear = 1'b0;
        ones = 0;
        for (int unsigned t = 0; t < N; t++) begin
          x = bern(px); y = bern(py); half = bern(0.5);
          #1 ones += z;
          @(negedge clk);
        end
        bz = 2.0 * ones / N - 1.0;
        bexp = 0.5 * (((2.0 * px - 1.0) > (2.0 * py - 1.0)) ? (2.0 * px - 2.0 * py) : (2.0 * py - 2.0 * px));
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
    $display("basub MSE over %0d points, %0d-bit streams: %0.6f", npts, N, sq_sum / npts);
    checks++;
    if (sq_sum / npts > MSE_MAX) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80 * (N + 1)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
