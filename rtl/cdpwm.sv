// cdpwm: counter-based digital PWM generator.
//
// An N-bit up-counter running at the clock is the carrier. A zero value
// match comparator (count == INIT_VALUE, 0 by default) raises SET and a DC
// value match comparator (count == duty) raises RESET of an SR flip-flop,
// whose Q is the PWM output. One switching period is 2^N clocks, so the
// clock must be 2^N times the switching frequency (F_clk = 2^N * f_s).
// This structure - counter, two match comparators, SR flip-flop, ZVM on
// SET and DCVM on RESET - is the published one.
//
// This design's own choices: RESET wins over SET, so duty = 0 gives a
// constant low output and Q is high for exactly `duty` clocks of every
// period (duty ratio duty/2^N, at most (2^N-1)/2^N). The duty input is
// copied into a holding register on the last count of each period, so a
// change takes effect at the next period boundary and never splits a
// pulse. Reset (rst_n) is synchronous and active low.
//
// Timing: with the counter at 0 in clock cycle t, Q rises at t+1 and falls
// at t+1+duty.
module cdpwm #(
  parameter int unsigned N          = 8,
  parameter int unsigned INIT_VALUE = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] duty,
  output logic         q,
  output logic         qn
);

  logic [N-1:0] count;
  logic [N-1:0] duty_r;
  logic         zvm, dcvm;

  mod_counter #(.N(N)) u_counter (
    .clk, .rst_n, .en(1'b1), .count
  );

  // Duty holding register, loaded as the period ends.
  always_ff @(posedge clk) begin
    if (!rst_n)          duty_r <= '0;
    else if (&count)     duty_r <= duty;
  end

  // Comparators: zero value match and DC value match.
  always_comb begin
    zvm  = (count == N'(INIT_VALUE));
    dcvm = (count == duty_r);
  end

  sr_ff #(.SET_WINS(1'b0)) u_sr (
    .clk, .rst_n, .set(zvm), .reset(dcvm), .q, .qn
  );

endmodule
