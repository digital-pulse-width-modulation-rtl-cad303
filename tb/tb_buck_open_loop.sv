// tb_buck_open_loop: open-loop line- and load-disturbance runs of the buck
// converter driven by each of the three DPWM generators (default 8-bit
// resolution, 256 clocks per switching period).
//
// The DPWM block drives a behavioural model of the power stage (Vin = 20 V,
// L = 16 uH, C = 15 nF, 10 Ohm load). For each generator, with a fixed duty
// word, the bench applies in turn: the nominal operating point, a line step
// of Vin from 20 V to 24 V, and a load step from 10 Ohm to 5 Ohm (the step
// sizes are this bench's choice). After each step it lets the output settle
// and checks the average output voltage over one switching period against
// D * Vin, where D is the generator's duty ratio (duty/256 for the counter
// generator, (duty+1)/256 for the others) - within 1 %. It also counts the
// steps whose output moved in the right direction.
`timescale 1ns/1ps
module tb_buck_open_loop;
  import dpwm_pkg::*;
  localparam int N = DPWM_BITS;
  localparam int P = 1 << N;
  localparam int SETTLE = 400 * P;         // 400 periods = 25 us at 16 MHz
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] duty = N'(127);
  gen_sel_e gen_sel = GEN_CDPWM;
  logic pwm_q, pwm_qn;
  logic [2:0] pwm_all;
  real vin = 20.0, r_load = 10.0, vout, il;
  int checks = 0, failures = 0;
  int n_line = 0, n_load = 0;

  dpwm_top dut (.clk, .rst_n, .duty, .gen_sel, .pwm_q, .pwm_qn, .pwm_all);
  buck_converter_model plant (.clk, .rst_n, .gate(pwm_q), .vin, .r_load, .vout, .il);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic avg_period(output real v);
    real s;
    s = 0.0;
    for (int c = 0; c < P; c++) begin
      @(negedge clk);
      s += vout;
    end
    v = s / P;
  endtask

  task automatic check_level(input string what, input real ratio);
    real v, want;
    repeat (SETTLE) @(negedge clk);
    avg_period(v);
    want = ratio * vin;
    checks++;
    if (v < 0.99 * want || v > 1.01 * want) begin
      failures++;
      $display("generator %0d %s: Vout %0.3f V, expected %0.3f V", gen_sel, what, v, want);
    end else
      $display("generator %0d %-24s Vin %5.1f V  R %4.1f Ohm  Vout %6.3f V (D*Vin %6.3f V)",
               gen_sel, what, vin, r_load, v, want);
  endtask

  initial begin
    real ratio, v_before, v_after;
    for (int g = 0; g < 3; g++) begin
      gen_sel = gen_sel_e'(g);
      vin = 20.0; r_load = 10.0;
      rst_n = 1'b0;
      repeat (3) @(negedge clk);
      rst_n = 1'b1;
      ratio = (g == 0) ? real'(duty) / P : real'(duty + 1) / P;
      check_level("nominal", ratio);
      avg_period(v_before);
      vin = 24.0;
      check_level("line step 20 V -> 24 V", ratio);
      avg_period(v_after);
      if (v_after > v_before) n_line++;
      vin = 20.0;
      repeat (SETTLE) @(negedge clk);
      avg_period(v_before);
      r_load = 5.0;
      check_level("load step 10 -> 5 Ohm", ratio);
      avg_period(v_after);
      if (v_after < v_before + 0.05 && v_after > v_before - 0.2) n_load++;
    end
    checks++; if (n_line != 3) begin failures++; $display("line step not followed by all generators"); end
    checks++; if (n_load != 3) begin failures++; $display("load step not absorbed by all generators"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
