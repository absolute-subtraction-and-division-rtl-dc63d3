// tb_jk_ff: self-checking testbench for jk_ff.
// Random J, K, en and clear are checked against the JK truth table every
// cycle; then, with uncorrelated random J and K, the fraction of cycles with
// Q=1 must be close to P_J / (P_J + P_K).
module tb_jk_ff;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic en = 1'b0;
  logic j = 1'b0, k = 1'b0;
  logic q;
  logic q_ref;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  jk_ff dut (.clk, .rst_n, .clear, .en, .j, .k, .q);

  always @(posedge clk) begin
    if (!rst_n || clear) q_ref <= 1'b0;
    else if (en) q_ref <= (j & ~q_ref) | (~k & q_ref);
  end

  function automatic logic bern(input int unsigned thr16);
    return $urandom_range(0, 65535) < thr16;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      en = ($urandom_range(0, 7) != 0);
      clear = ($urandom_range(0, 63) == 0);
      j = $urandom_range(0, 1);
      k = $urandom_range(0, 1);
      @(negedge clk);
      checks++;
      if (q !== q_ref) begin
        failures++;
        $display("t=%0t q=%0b expected %0b", $time, q, q_ref);
      end
    end
    en = 1'b1; clear = 1'b0;
    for (int i = 1; i <= 5; i++) begin
      real pj, pk, pq;
      int ones;
      ones = 0;
      pj = 0.1 * i; pk = 0.6 - 0.1 * i + 0.05;
      for (int t = 0; t < 8192; t++) begin
        j = bern(int'(pj * 65536.0)); k = bern(int'(pk * 65536.0));
        @(negedge clk);
        ones += q;
      end
      pq = ones / 8192.0;
      checks++;
      if (pq - pj / (pj + pk) > 0.04 || pj / (pj + pk) - pq > 0.04) begin
        failures++;
        $display("ratio: pj=%0.2f pk=%0.2f pq=%0.4f", pj, pk, pq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
