// tb_buck_closed_loop: closed-loop start-up of the buck converter with each
// of the three DPWM generators (default 8-bit resolution, 16 MHz switching
// at a 4.096 GHz DPWM clock).
//
// Loop: set value - output voltage -> PI compensator -> 8-bit quantiser ->
// DPWM block -> power stage model -> output voltage. The compensator and
// quantiser stand in for the analog controller and converter that produce
// the duty word; they live in this bench and update once per switching
// period from the output voltage averaged over that period. The gains
// (KP = 0.07, KI = 0.003 per period, zero near the filter's slow pole) and
// the 10 V set value are this bench's choices.
//
// From reset (output at 0 V) the bench records delay time (50 %), rise time
// (10-90 %), peak time, overshoot, settling time (2 % band) and steady-state
// error, prints them, and checks for each generator: the output settles
// within 20 us, the overshoot stays below 20 %, and the steady-state error
// (average of the last 16 periods) is below 0.1 V. Up to two duty codes
// of quantisation ripple are expected around the set value.
`timescale 1ns/1ps
module tb_buck_closed_loop;
  import dpwm_pkg::*;
  localparam int  N       = DPWM_BITS;
  localparam int  P       = 1 << N;
  localparam real T_CLK   = 1.0 / 4.096e9;       // seconds per DPWM clock
  localparam real VREF    = 10.0;
  localparam real KP      = 0.07;
  localparam real KI      = 0.003;
  localparam int  PERIODS = 640;                 // 40 us
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] duty = '0;
  gen_sel_e gen_sel = GEN_CDPWM;
  logic pwm_q, pwm_qn;
  logic [2:0] pwm_all;
  real vin = 20.0, r_load = 10.0, vout, il;
  int checks = 0, failures = 0;
  real vtrace [PERIODS];

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

  // First period index (as time in us) at which the trace reaches level.
  function automatic real t_cross(real level);
    for (int k = 0; k < PERIODS; k++)
      if (vtrace[k] >= level) return real'(k + 1) * P * T_CLK * 1.0e6;
    return -1.0;
  endfunction

  initial begin
    real s, e, integ, u, peak, t_peak, t_set, ess, mp, td, tr;
    int code;
    $display("gen  t_d(us)  t_r(us)  t_p(us)  MP(%%)  t_s(us)  e_ss(V)");
    for (int g = 0; g < 3; g++) begin
      gen_sel = gen_sel_e'(g);
      duty = '0; integ = 0.0;
      rst_n = 1'b0;
      repeat (3) @(negedge clk);
      rst_n = 1'b1;
      for (int k = 0; k < PERIODS; k++) begin
        s = 0.0;
        for (int c = 0; c < P; c++) begin
          @(negedge clk);
          s += vout;
        end
        vtrace[k] = s / P;
        e = VREF - vtrace[k];
        u = KP * e + integ + KI * e;
        if (u > 0.0 && u < 1.0) integ += KI * e;   // no wind-up at the limits
        code = int'(u * P);
        if (code < 0) code = 0;
        if (code > P - 1) code = P - 1;
        duty = N'(code);
      end
      peak = 0.0; t_peak = 0.0;
      for (int k = 0; k < PERIODS; k++)
        if (vtrace[k] > peak) begin peak = vtrace[k]; t_peak = real'(k + 1) * P * T_CLK * 1.0e6; end
      t_set = 0.0;
      for (int k = 0; k < PERIODS; k++)
        if (vtrace[k] < 0.98 * VREF || vtrace[k] > 1.02 * VREF) t_set = real'(k + 1) * P * T_CLK * 1.0e6;
      ess = 0.0;
      for (int k = PERIODS - 16; k < PERIODS; k++) ess += VREF - vtrace[k];
      ess /= 16.0;
      mp = (peak > VREF) ? 100.0 * (peak - VREF) / VREF : 0.0;
      td = t_cross(0.5 * VREF);
      tr = t_cross(0.9 * VREF) - t_cross(0.1 * VREF);
      if (mp > 0.0)
        $display("%0d    %7.3f  %7.3f  %7.3f  %5.2f  %7.3f  %7.4f", g, td, tr, t_peak, mp, t_set, ess);
      else  // no overshoot: no peak time
        $display("%0d    %7.3f  %7.3f        -   0.00  %7.3f  %7.4f", g, td, tr, t_set, ess);
      checks++;
      if (t_set > 20.0) begin failures++; $display("generator %0d: settling %0.2f us", g, t_set); end
      checks++;
      if (mp > 20.0) begin failures++; $display("generator %0d: overshoot %0.1f %%", g, mp); end
      checks++;
      if (ess > 0.1 || ess < -0.1) begin failures++; $display("generator %0d: steady-state error %0.3f V", g, ess); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
