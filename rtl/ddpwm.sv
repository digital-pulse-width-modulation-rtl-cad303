// ddpwm: delay-line (ring-counter) based digital PWM generator.
//
// A one-hot ring counter of 2^N taps advances one tap per clock and so
// plays the part of a delay line whose taps are one clock apart. Each tap
// goes through its own D flip-flop to a 2^N:1 multiplexer. The flip-flop
// of the last tap (2^N-1) sets the SR flip-flop; the multiplexer, whose
// select line is the duty word, resets it when the ring reaches the
// selected tap. This structure follows the published design.
//
// With SET on tap 2^N-1 and RESET on tap d, Q is high for d+1 clocks of
// each 2^N-clock period. This design lets SET win when both arrive together
// (d = 2^N-1), which makes that code a constant high: duty ratio =
// (d+1)/2^N, from 1/2^N up to 100 %. The duty word is copied into a holding
// register as the ring passes its last tap, so it changes only at a period
// boundary. Reset (rst_n) is synchronous and active low; the first period
// starts 2^N clocks after reset.
//
// Timing: SET is high in the clock after ring tap 2^N-1; Q rises one clock
// after SET and falls d+1 clocks after that.
module ddpwm #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] duty,
  output logic         q,
  output logic         qn
);

  localparam int unsigned TAPS = 1 << N;

  logic [TAPS-1:0] ring;
  logic [TAPS-1:0] ring_q;
  logic [N-1:0]    duty_r;
  logic            mux_out;

  ring_counter #(.TAPS(TAPS)) u_ring (
    .clk, .rst_n, .en(1'b1), .taps(ring)
  );

  tap_dff_bank #(.WIDTH(TAPS)) u_dff (
    .clk, .rst_n, .d(ring), .q(ring_q)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)            duty_r <= '0;
    else if (ring[TAPS-1]) duty_r <= duty;
  end

  tap_mux #(.SEL_BITS(N)) u_mux (
    .in_bits(ring_q), .sel(duty_r), .out_bit(mux_out)
  );

  sr_ff #(.SET_WINS(1'b1)) u_sr (
    .clk, .rst_n, .set(ring_q[TAPS-1]), .reset(mux_out), .q, .qn
  );

endmodule
