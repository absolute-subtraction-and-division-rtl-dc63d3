// tb_udiv: self-checking testbench for udiv.
// For pairs with P_Y <= P_X the divider gets random uncorrelated 2^K-bit
// streams and a 0.5 stream; the fraction of 1s of the quotient stream must
// be close to P_Y / P_X at each point, and the mean squared error over all
// points must be small. 1024-bit streams, the default stream length.
module tb_udiv;

  localparam int unsigned K = 10;
  localparam int unsigned N = 1 << K;
  localparam real TOL = 0.2;
  localparam real MSE_MAX = 0.008;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic en = 1'b0;
  logic x = 1'b0, y = 1'b0, half = 1'b0;
  logic z;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  udiv #(.K(K), .SEED(K'(10'h2C5)), .ALT_POLY(1'b1)) dut (.clk, .rst_n, .clear, .en, .x, .y, .half, .z);

  function automatic logic bern(input real p);
    return $urandom_range(0, 65535) < int'(p * 65536.0);
  endfunction

  real sq_sum = 0.0;
  int  npts = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    for (int ix = 3; ix <= 10; ix++) begin
      for (int iy = 0; iy <= ix; iy++) begin
        real px, py, pz, pexp, err;
        int ones;
        px = ix / 10.0; py = iy / 10.0;
        clear = 1'b1; @(negedge clk); clear = 1'b0;
        ones = 0;
        for (int unsigned t = 0; t < N; t++) begin
          x = bern(px); y = bern(py); half = bern(0.5);
          #1 ones += z;
          @(negedge clk);
        end
        pz = real'(ones) / N;
        pexp = py / px;
        err = pz - pexp;
        sq_sum += err * err;
        npts++;
        checks++;
        if (err > TOL || err < -TOL) begin
          failures++;
          $display("px=%0.2f py=%0.2f: Pz=%0.4f expected %0.4f", px, py, pz, pexp);
        end
      end
    end
    $display("udiv MSE over %0d points, %0d-bit streams: %0.6f", npts, N, sq_sum / npts);
    checks++;
    if (sq_sum / npts > MSE_MAX) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70 * (N + 1)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
