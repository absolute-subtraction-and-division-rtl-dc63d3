// tb_sng: self-checking testbench for sng.
// Over any 2^K-1 consecutive cycles the LFSR visits 1..2^K-1 once, so the
// output must hold exactly max(n-1, 0) ones. The test holds n for one full
// period for corner and random values of n and counts the 1s.
module tb_sng;

  localparam int unsigned K = 8;
  localparam int unsigned PERIOD = (1 << K) - 1;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [K-1:0] n = '0;
  logic         bit_o;
  int           checks = 0;
  int           failures = 0;

  always #5 clk = ~clk;

  sng #(.K(K), .SEED(K'(8'h2D)), .ALT_POLY(1'b0)) dut (.clk, .rst_n, .en(1'b1), .n, .bit_o);

  task automatic run_one(input int unsigned value);
    int unsigned ones = 0;
    int unsigned expect_ones;
    n = K'(value);
    for (int unsigned i = 0; i < PERIOD; i++) begin
      #1;
      ones += bit_o;
      @(negedge clk);
    end
    expect_ones = (value == 0) ? 0 : value - 1;
    checks++;
    if (ones != expect_ones) begin
      failures++;
      $display("n=%0d: %0d ones, expected %0d", value, ones, expect_ones);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_one(0);
    run_one(1);
    run_one(2);
    run_one(1 << (K - 1));
    run_one((1 << K) - 1);
    repeat (20) run_one($urandom_range(0, (1 << K) - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30 * PERIOD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
