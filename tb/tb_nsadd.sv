// tb_nsadd: self-checking testbench for nsadd.
// A reference model of the two-state diagram (one saved 1) predicts every
// output bit for random inputs, with en and clear toggled. Then, for pairs
// with P_X + P_Y <= 1, the fraction of 1s over 4096 bits must match the
// stationary value of the two-state chain, and P_X + P_Y for small sums.
module tb_nsadd;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic en = 1'b0;
  logic x = 1'b0, y = 1'b0;
  logic z;
  logic saved;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  nsadd dut (.clk, .rst_n, .clear, .en, .x, .y, .z);

  always @(posedge clk) begin
    if (!rst_n || clear) saved <= 1'b0;
    else if (en) begin
      if (x && y) saved <= 1'b1;
      else if (!x && !y) saved <= 1'b0;
    end
  end

  function automatic logic bern(input int unsigned thr16);
    return $urandom_range(0, 65535) < thr16;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      en = ($urandom_range(0, 7) != 0);
      clear = ($urandom_range(0, 63) == 0);
      x = $urandom_range(0, 1);
      y = $urandom_range(0, 1);
      #1;
      checks++;
      if (z !== (x | y | saved)) begin
        failures++;
        $display("t=%0t x=%0b y=%0b saved=%0b z=%0b", $time, x, y, saved, z);
      end
      @(negedge clk);
    end
    en = 1'b1; clear = 1'b0;
    for (int i = 0; i < 6; i++) begin
      real px, py, pz, p11, p00, pexp;
      int ones;
      ones = 0;
      px = 0.1 * i; py = 0.5 - 0.05 * i + 0.02 * i;
      for (int t = 0; t < 4096; t++) begin
        x = bern(int'(px * 65536.0)); y = bern(int'(py * 65536.0));
        #1 ones += z;
        @(negedge clk);
      end
      pz = ones / 4096.0;
      // Stationary output of the two-state chain: a 1-1 pair saves a 1, a
      // 0-0 pair spends it, so P(S1) = P11 / (P11 + P00) and
      // P_Z = 1 - P00 + P00 * P(S1). It equals P_X + P_Y when the inputs
      // rarely coincide and falls below it as the sum approaches 1.
      p11 = px * py;
      p00 = (1.0 - px) * (1.0 - py);
      pexp = 1.0 - p00 + p00 * p11 / (p11 + p00);
      checks++;
      if (pz - pexp > 0.03 || pexp - pz > 0.03) begin
        failures++;
        $display("sum: px=%0.2f py=%0.2f pz=%0.4f expected %0.4f", px, py, pz, pexp);
      end
      // Near the nominal sum for the small sums
      if (px + py <= 0.6) begin
        checks++;
        if (pz - (px + py) > 0.05 || (px + py) - pz > 0.05) begin
          failures++;
          $display("sum: px=%0.2f py=%0.2f pz=%0.4f", px, py, pz);
        end
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
