// tb_sc_absdiv_top: end-to-end testbench of sc_absdiv_top at its default
// parameters (K = 10, 1024-bit streams).
// For a list of (P_X, P_Y) pairs, given as 10-bit binary numbers, it starts a
// stream, counts the 1s of every output over the bit_valid cycles and
// compares them with the ideal functions:
//   z_uasub  0.5|P_X-P_Y|
//   z_basub  2P_Z-1 = |P_X-P_Y|           (0.5|(2P_X-1)-(2P_Y-1)|)
//   z_udiv   P_Y/P_X                      (only for P_Y <= P_X, P_X >= 0.3)
//   z_bdiv   2P_Z-1 = (2P_Y-1)/(2P_X-1)   (only inside its input range)
// The tolerances are those of a single 1024-bit stream of these circuits.
// It checks that a stream lasts exactly 2^K cycles with one last pulse, that
// a start during a stream is ignored, and counts how often each mechanism of
// the design happened: counter reload, counter above and below its start
// value (both branches of the XNOR magnitude), the adder saving a 1, the JK
// flip-flop toggling, and an ignored start. A mechanism that never happened
// counts as a failure.
module tb_sc_absdiv_top;

  localparam int unsigned K = 10;
  localparam int unsigned N = 1 << K;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [K-1:0] px = '0, py = '0;
  logic         busy, bit_valid, last;
  logic         z_uasub, z_basub, z_udiv, z_bdiv;
  int           checks = 0;
  int           failures = 0;

  always #5 clk = ~clk;

  sc_absdiv_top dut (
    .clk, .rst_n, .start, .px, .py, .busy, .bit_valid, .last,
    .z_uasub, .z_basub, .z_udiv, .z_bdiv
  );

  // ---------------------------------------------------------- mechanisms
  int n_reload = 0, n_cnt_pos = 0, n_cnt_neg = 0, n_saved = 0, n_toggle = 0, n_ignored = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.clear) n_reload++;
    if (dut.busy && dut.u_uasub.cnt > (1 << K)) n_cnt_pos++;
    if (dut.busy && dut.u_uasub.cnt < (1 << K)) n_cnt_neg++;
    if (dut.busy && dut.u_basub.u_nsadd.state == 1'b1) n_saved++;
    if (dut.busy && dut.u_bdiv.u_jk.j && dut.u_bdiv.u_jk.k) n_toggle++;
    if (dut.busy && start) n_ignored++;
  end

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  task automatic run_pair(input int unsigned nx, input int unsigned ny, input bit poke);
    int unsigned o_u, o_b, o_ud, o_bd, cyc, lasts;
    real rx, ry, bx, by;
    px = K'(nx); py = K'(ny);
    rx = real'(nx) / N; ry = real'(ny) / N;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    o_u = 0; o_b = 0; o_ud = 0; o_bd = 0; cyc = 0; lasts = 0;
    while (bit_valid) begin
      o_u += z_uasub; o_b += z_basub; o_ud += z_udiv; o_bd += z_bdiv;
      lasts += last;
      cyc++;
      if (poke && cyc == 300) start = 1'b1;
      @(negedge clk);
      start = 1'b0;
    end
    checks++;
    if (cyc != N || lasts != 1) begin
      failures++;
      $display("stream length %0d, last pulses %0d", cyc, lasts);
    end
    checks++;
    if (!near(real'(o_u) / N, 0.5 * (rx > ry ? rx - ry : ry - rx), 0.06)) begin
      failures++;
      $display("uasub px=%0.3f py=%0.3f: %0.4f", rx, ry, real'(o_u) / N);
    end
    checks++;
    if (!near(2.0 * o_b / N - 1.0, (rx > ry ? rx - ry : ry - rx), 0.4)) begin
      failures++;
      $display("basub px=%0.3f py=%0.3f: %0.4f", rx, ry, 2.0 * o_b / N - 1.0);
    end
    if (ry <= rx && rx >= 0.3) begin
      checks++;
      if (!near(real'(o_ud) / N, ry / rx, 0.3)) begin
        failures++;
        $display("udiv px=%0.3f py=%0.3f: %0.4f", rx, ry, real'(o_ud) / N);
      end
    end
    bx = 2.0 * rx - 1.0; by = 2.0 * ry - 1.0;
    if ((bx < 0 ? -bx : bx) >= 0.4 && (by < 0 ? -by : by) <= (bx < 0 ? -bx : bx)) begin
      checks++;
      if (!near(2.0 * o_bd / N - 1.0, by / bx, 0.7)) begin
        failures++;
        $display("bdiv px=%0.3f py=%0.3f: %0.4f", rx, ry, 2.0 * o_bd / N - 1.0);
      end
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (busy || bit_valid) begin failures++; $display("busy after reset"); end
    run_pair(900, 300, 1'b1);   // X > Y: counter above its start value
    run_pair(200, 700, 1'b0);   // X < Y: counter below
    run_pair(1000, 50, 1'b0);
    run_pair(512, 512, 1'b0);
    run_pair(820, 800, 1'b0);
    run_pair(100, 300, 1'b0);
    for (int i = 0; i < 6; i++) run_pair($urandom_range(0, N - 1), $urandom_range(0, N - 1), 1'b0);
    $display("mechanisms: reload=%0d count_above=%0d count_below=%0d nsadd_saved=%0d jk_toggle=%0d start_ignored=%0d",
             n_reload, n_cnt_pos, n_cnt_neg, n_saved, n_toggle, n_ignored);
    checks++; if (n_reload != 12) failures++;
    checks++; if (n_cnt_pos == 0) failures++;
    checks++; if (n_cnt_neg == 0) failures++;
    checks++; if (n_saved == 0) failures++;
    checks++; if (n_toggle == 0) failures++;
    checks++; if (n_ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * (N + 2)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
