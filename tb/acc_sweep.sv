// acc_sweep: testbench helper. Measures the mean squared error of the
// bipolar scaled absolute subtractor (basub), the unipolar divider (udiv)
// and the bipolar divider (bdiv) at one stream length 2^K over PAIRS random
// input pairs per circuit. The three circuits run side by side, each on its
// own pairs and its own random input streams.
//   basub: P_X, P_Y uniform in [0,1]; reference 0.5|(2P_X-1)-(2P_Y-1)|.
//   udiv:  pairs with P_Y <= P_X and P_X >= 0.1; reference P_Y/P_X.
//   bdiv:  pairs with |2P_Y-1| <= |2P_X-1| and |2P_X-1| >= 0.2;
//          reference (2P_Y-1)/(2P_X-1).
// Results (mse_basub, mse_udiv, mse_bdiv) are valid when done is high.
module acc_sweep #(
  parameter int unsigned K     = 10,
  parameter int unsigned PAIRS = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output real  mse_basub,
  output real  mse_udiv,
  output real  mse_bdiv
);

  localparam int unsigned N = 1 << K;

  logic       clr [3];
  logic       xa, ya, ha, za;
  logic       xu, yu, hu, zu;
  logic       xb, yb;
  logic [2:0] hb;
  logic       zb;

  basub #(.K(K), .SEED(K'(3)), .ALT_POLY(1'b1)) u_basub (
    .clk, .rst_n, .clear(clr[0]), .en(1'b1), .x(xa), .y(ya), .half(ha), .z(za));
  udiv  #(.K(K), .SEED(K'(5)), .ALT_POLY(1'b1)) u_udiv (
    .clk, .rst_n, .clear(clr[1]), .en(1'b1), .x(xu), .y(yu), .half(hu), .z(zu));
  bdiv  #(.K(K), .SEED(K'(7))) u_bdiv (
    .clk, .rst_n, .clear(clr[2]), .en(1'b1), .x(xb), .y(yb), .half(hb), .z(zb));

  function automatic logic bern(input real p);
    return $urandom_range(0, 65535) < int'(p * 65536.0);
  endfunction

  function automatic real urand();
    return $urandom_range(0, 1000000) / 1000000.0;
  endfunction

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    int fin;
    done = 1'b0;
    fin = 0;
    clr = '{default: 1'b0};
    xa = 0; ya = 0; ha = 0; xu = 0; yu = 0; hu = 0; xb = 0; yb = 0; hb = '0;
    mse_basub = 0.0; mse_udiv = 0.0; mse_bdiv = 0.0;
    wait (rst_n);
    @(negedge clk);
    fork
      begin : t_basub
        real px, py, s;
        int ones;
        s = 0.0;
        for (int p = 0; p < PAIRS; p++) begin
          px = urand(); py = urand();
          clr[0] = 1'b1; @(negedge clk); clr[0] = 1'b0;
          ones = 0;
          for (int t = 0; t < N; t++) begin
            xa = bern(px); ya = bern(py); ha = bern(0.5);
            #1 ones += za;
            @(negedge clk);
          end
          s += (2.0 * ones / N - 1.0 - absr(px - py)) ** 2;
        end
        mse_basub = s / PAIRS;
        fin++;
      end
      begin : t_udiv
        real px, py, s;
        int ones;
        s = 0.0;
        for (int p = 0; p < PAIRS; p++) begin
          do begin px = urand(); py = urand(); end while (py > px || px < 0.1);
          clr[1] = 1'b1; @(negedge clk); clr[1] = 1'b0;
          ones = 0;
          for (int t = 0; t < N; t++) begin
            xu = bern(px); yu = bern(py); hu = bern(0.5);
            #1 ones += zu;
            @(negedge clk);
          end
          s += (real'(ones) / N - py / px) ** 2;
        end
        mse_udiv = s / PAIRS;
        fin++;
      end
      begin : t_bdiv
        real px, py, s;
        int ones;
        s = 0.0;
        for (int p = 0; p < PAIRS; p++) begin
          do begin px = urand(); py = urand(); end
            while (absr(2.0 * py - 1.0) > absr(2.0 * px - 1.0) || absr(2.0 * px - 1.0) < 0.2);
          clr[2] = 1'b1; @(negedge clk); clr[2] = 1'b0;
          ones = 0;
          for (int t = 0; t < N; t++) begin
            xb = bern(px); yb = bern(py); hb = {bern(0.5), bern(0.5), bern(0.5)};
            #1 ones += zb;
            @(negedge clk);
          end
          s += (2.0 * ones / N - 1.0 - (2.0 * py - 1.0) / (2.0 * px - 1.0)) ** 2;
        end
        mse_bdiv = s / PAIRS;
        fin++;
      end
    join
    done = 1'b1;
  end

endmodule
