// tb_cdpwm: self-checking test of the counter-based DPWM generator at its default
// 8-bit resolution (period 256 clocks).
//
// The expected high time per period is worked out in the bench from the
// duty word alone: d. Checks:
//  * latency: with the duty word set q_was reset is released, the first
//    rising edge of Q comes in the 257th clock after release (first period
//    runs with the reset duty, the new word is taken at the first boundary);
//  * every duty word 0..255 (in shuffled order): after two periods, a
//    512-clock window must hold exactly 2x the expected high clocks, two
//    rising edges exactly 256 clocks apart (none for 0 % or 100 %);
//  * no split pulses: every pulse that ends while the duty word changes has
//    the old or the new length;
//  * Q' is always the complement of Q.
`timescale 1ns/1ps
module tb_cdpwm;
  localparam int N = 8;
  localparam int P = 1 << N;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] duty;
  logic q, qn;
  int checks = 0, failures = 0;
  int k = 0, run = 0, exp_old = 0, exp_cur = 0;
  logic q_prev = 1'b0;
  int order [P];

  cdpwm dut (.clk, .rst_n, .duty, .q, .qn);

  always #5 clk = ~clk;

  function automatic int expected_high(int d);
    return d;
  endfunction

  // Pulse-length and complement monitor, sampled mid-cycle.
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (qn !== ~q) begin failures++; $display("Q' is not the complement of Q"); end
    if (q) run++;
    if (q_prev && !q) begin
      if (exp_old > 0 && exp_old < P && exp_cur > 0 && exp_cur < P) begin
        checks++;
        if (run != exp_old && run != exp_cur) begin
          failures++;
          $display("pulse of %0d clocks, expected %0d or %0d", run, exp_old, exp_cur);
        end
      end
      run = 0;
    end
    q_prev = q;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_rise, highs, rises, rise_at [2], d;
    // latency from reset
    duty = N'(100);
    exp_old = expected_high(100); exp_cur = exp_old;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    first_rise = -1;
    for (k = 1; k <= 2 * P; k++) begin
      @(negedge clk);
      if (q && first_rise < 0) first_rise = k;
    end
    checks++;
    if (first_rise != P + 1) begin
      failures++;
      $display("first rising edge after %0d clocks, expected %0d", first_rise, P + 1);
    end

    // shuffled sweep of every duty word
    for (int i = 0; i < P; i++) order[i] = i;
    for (int i = P - 1; i > 0; i--) begin
      int j, t;
      j = $urandom_range(0, i);
      t = order[i]; order[i] = order[j]; order[j] = t;
    end
    for (int i = 0; i < P; i++) begin
      d = order[i];
      repeat ($urandom_range(0, P - 1)) @(negedge clk);
      duty = N'(d);
      exp_old = exp_cur; exp_cur = expected_high(d);
      repeat (2 * P) @(negedge clk);
      exp_old = exp_cur;
      highs = 0; rises = 0;
      for (int c = 0; c < 2 * P; c++) begin
        logic q_was;
        q_was = q;
        @(negedge clk);
        if (q) highs++;
        if (q && !q_was) begin
          if (rises < 2) rise_at[rises] = c;
          rises++;
        end
      end
      checks++;
      if (highs != 2 * exp_cur) begin
        failures++;
        $display("duty %0d: %0d high clocks in two periods, expected %0d", d, highs, 2 * exp_cur);
      end
      checks++;
      if (exp_cur > 0 && exp_cur < P) begin
        if (rises != 2 || rise_at[1] - rise_at[0] != P) begin
          failures++;
          $display("duty %0d: %0d rising edges, spacing wrong", d, rises);
        end
      end else if (rises != 0) begin
        failures++;
        $display("duty %0d: output should be constant", d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
