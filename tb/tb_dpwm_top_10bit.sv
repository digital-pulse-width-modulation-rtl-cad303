// tb_dpwm_top_10bit: the end-to-end test of tb_dpwm_top repeated with the
// DPWM block built for 10-bit resolution (1024-clock switching period,
// 1024-tap delay-line ring, hybrid split 5 counter bits + 5 ring bits).
//
// For a series of duty words (both ends of the range plus random ones) the
// bench waits until the new word has taken effect, then observes two
// switching periods and checks, for each of the three generators, the
// number of high clocks (cdpwm: duty, ddpwm/hdpwm: duty+1 per period) and
// the period (rising edges 2^N clocks apart). gen_sel is cycled through all
// three generators; pwm_q/pwm_qn must follow the selected one. The average
// converter output that the measured duty ratio would give, Vout = d * Vin
// with Vin = 20 V, is printed for the selected generator.
//
// Mechanisms that must each happen at least once: every generator selected,
// 0 % output (cdpwm, duty 0), 100 % output (ddpwm/hdpwm, duty 1023), a duty
// change taking effect at a period boundary, a hybrid pulse inside one ring
// revolution (<= 32 clocks) and one spanning several revolutions.
`timescale 1ns/1ps
module tb_dpwm_top_10bit;
  import dpwm_pkg::*;
  localparam int N = 10;
  localparam int P = 1 << N;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] duty = '0;
  gen_sel_e gen_sel = GEN_CDPWM;
  logic pwm_q, pwm_qn;
  logic [2:0] pwm_all;
  int checks = 0, failures = 0;
  int n_sel [3];
  int n_zero = 0, n_full = 0, n_update = 0, n_hyb_short = 0, n_hyb_long = 0;

  dpwm_top #(.N(N)) dut (.clk, .rst_n, .duty, .gen_sel, .pwm_q, .pwm_qn, .pwm_all);

  always #5 clk = ~clk;

  function automatic int expected_high(int g, int d);
    return (g == 0) ? d : d + 1;
  endfunction

  // Selected output must follow the chosen generator.
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (pwm_q !== pwm_all[gen_sel] || pwm_qn !== ~pwm_q) begin
      failures++;
      $display("pwm_q/pwm_qn do not follow generator %0d", gen_sel);
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int d);
    int highs [3], rises [3], r0 [3], r1 [3];
    logic [2:0] was;
    for (int g = 0; g < 3; g++) begin highs[g] = 0; rises[g] = 0; r0[g] = 0; r1[g] = 0; end
    for (int c = 0; c < 2 * P; c++) begin
      was = pwm_all;
      @(negedge clk);
      for (int g = 0; g < 3; g++) begin
        if (pwm_all[g]) highs[g]++;
        if (pwm_all[g] && !was[g]) begin
          if (rises[g] == 0) r0[g] = c; else r1[g] = c;
          rises[g]++;
        end
      end
    end
    for (int g = 0; g < 3; g++) begin
      int e;
      e = expected_high(g, d);
      checks++;
      if (highs[g] != 2 * e) begin
        failures++;
        $display("generator %0d duty %0d: %0d high clocks, expected %0d", g, d, highs[g], 2 * e);
      end
      checks++;
      if (e > 0 && e < P) begin
        if (rises[g] != 2 || r1[g] - r0[g] != P) begin
          failures++;
          $display("generator %0d duty %0d: period wrong", g, d);
        end
      end else if (rises[g] != 0) begin
        failures++;
        $display("generator %0d duty %0d: not constant", g, d);
      end
      if (e == 0 && highs[g] == 0) n_zero++;
      if (e == P && highs[g] == 2 * P) n_full++;
      if (g == 2 && e > 0 && e <= 32 && highs[g] == 2 * e) n_hyb_short++;
      if (g == 2 && e > 32 && e < P && highs[g] == 2 * e) n_hyb_long++;
    end
    $display("duty %4d  gen %0d  high %3d/%0d clocks  Vout = %0.3f V at Vin = 20 V",
             d, gen_sel, highs[gen_sel] / 2, P, 20.0 * real'(highs[gen_sel]) / real'(2 * P));
  endtask

  initial begin
    int list [$];
    int prev_high;
    list = '{0, 1023, 1, 1022, 31, 32, 33, 512};
    repeat (8) list.push_back($urandom_range(0, P - 1));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (P) @(negedge clk);
    foreach (list[i]) begin
      gen_sel = gen_sel_e'(i % 3);
      n_sel[i % 3]++;
      // change mid-period, then watch for the first period with the new word
      repeat ($urandom_range(1, P - 1)) @(negedge clk);
      duty = N'(list[i]);
      repeat (2 * P) @(negedge clk);
      measure(list[i]);
      if (i > 0 && list[i] != list[i - 1]) n_update++;
    end
    for (int g = 0; g < 3; g++) begin
      checks++;
      if (n_sel[g] == 0) begin failures++; $display("generator %0d never selected", g); end
    end
    $display("mechanisms: sel=%0d/%0d/%0d zero=%0d full=%0d update=%0d hyb_short=%0d hyb_long=%0d",
             n_sel[0], n_sel[1], n_sel[2], n_zero, n_full, n_update, n_hyb_short, n_hyb_long);
    checks++; if (n_zero == 0)      begin failures++; $display("0 %% output never seen"); end
    checks++; if (n_full == 0)      begin failures++; $display("100 %% output never seen"); end
    checks++; if (n_update == 0)    begin failures++; $display("duty update never seen"); end
    checks++; if (n_hyb_short == 0) begin failures++; $display("short hybrid pulse never seen"); end
    checks++; if (n_hyb_long == 0)  begin failures++; $display("multi-revolution hybrid pulse never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
