// tb_lfsr: self-checking testbench for lfsr.
// For several widths, both polynomials, and both the default leap-forward
// stepping and the plain one-shift-per-clock stepping it checks that the state never is
// zero, that every value 1..2^K-1 appears exactly once in 2^K-1 steps (a
// maximal-length sequence), that the state returns to the seed after the
// period, and that en=0 holds the state.
module tb_lfsr;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  int   checks = 0;
  int   failures = 0;
  int   done_cnt = 0;

  always #5 clk = ~clk;

  localparam int unsigned NW = 8;
  localparam int unsigned WIDTHS [NW] = '{3, 4, 6, 8, 10, 12, 13, 16};
  localparam int unsigned NDUT = 4 * NW;

  for (genvar w = 0; w < NW; w++) begin : g_w
    for (genvar v = 0; v < 4; v++) begin : g_v
      localparam int unsigned K = WIDTHS[w];
      localparam int unsigned a = v % 2;
      localparam int unsigned STEPS = (v < 2) ? sc_pkg::leap_steps(K) : 1;
      localparam logic [K-1:0] SEED = K'(5 + 2 * v);
      logic [K-1:0] q;

      lfsr #(.K(K), .SEED(SEED), .ALT_POLY(a[0]), .STEPS(STEPS)) dut (.clk, .rst_n, .en, .q);

      initial begin
        bit seen [int unsigned];
        int unsigned dup = 0, zero = 0;
        logic [K-1:0] held;
        @(posedge rst_n);
        @(negedge clk);
        checks++;
        if (q !== SEED) begin failures++; $display("K=%0d alt=%0d steps=%0d: not seeded", K, a, STEPS); end
        @(posedge en);
        for (int unsigned i = 0; i < (1 << K) - 1; i++) begin
          @(negedge clk);
          if (q == '0) zero++;
          if (seen.exists(q)) dup++;
          seen[q] = 1'b1;
        end
        checks++;
        if (zero != 0 || dup != 0 || seen.num() != (1 << K) - 1) begin
          failures++;
          $display("K=%0d alt=%0d steps=%0d: zero=%0d dup=%0d distinct=%0d", K, a, STEPS, zero, dup, seen.num());
        end
        checks++;
        if (q !== SEED) begin failures++; $display("K=%0d alt=%0d steps=%0d: period is not 2^K-1", K, a, STEPS); end
        done_cnt++;
        wait (!en);
        @(negedge clk);
        held = q;
        repeat (3) @(negedge clk);
        checks++;
        if (q !== held) begin failures++; $display("K=%0d alt=%0d steps=%0d: moved while en=0", K, a, STEPS); end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    en = 1'b1;
    wait (done_cnt == NDUT);
    @(negedge clk);
    en = 1'b0;
    repeat (6) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
