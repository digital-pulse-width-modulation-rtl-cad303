// hdpwm: hybrid (counter + ring-counter) digital PWM generator.
//
// The N-bit duty word is split in two: the ND low bits drive a 2^ND-tap
// ring counter / multiplexer (the delay-line part) and the NC = N-ND high
// bits drive a revolution counter with two comparators (the counter part).
// The ring counter advances one tap per clock; the NC-bit counter advances
// once per ring revolution, so a switching period is still 2^N clocks but
// the ring needs only 2^ND taps (32 instead of 256 at the defaults).
// The delay-line part gives a SET (last ring tap) and a RESET (multiplexer
// output); the counter part gives a SET (frame start) and a RESET (count
// equals the coarse duty). The two SETs are ANDed into SET and the two
// RESETs into RESET of one SR flip-flop. Split sizes (5 + 3), the AND
// gates and the single SR flip-flop follow the published design.
//
// This design's own choices: the high bits go to the counter; the counter
// value is registered in the same D flip-flop stage as the ring taps so
// both parts stay aligned; the counter-part SET is the counter at its last
// value (the frame wraps to zero after that revolution), its RESET is the
// count equal to the coarse duty. With these, Q is high for duty+1 clocks
// per period, exactly as in the delay-line generator, and SET wins a tie
// so duty = 2^N-1 is a constant high. The duty word is held in a register
// loaded at the period boundary. Reset (rst_n) is synchronous, active low.
module hdpwm #(
  parameter int unsigned N  = 8,
  parameter int unsigned ND = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] duty,
  output logic         q,
  output logic         qn
);

  localparam int unsigned NC   = N - ND;
  localparam int unsigned TAPS = 1 << ND;

  logic [TAPS-1:0] ring, ring_q;
  logic [NC-1:0]   rev, rev_q;
  logic [N-1:0]    duty_r;
  logic [ND-1:0]   duty_fine;
  logic [NC-1:0]   duty_coarse;
  logic            mux_out;
  logic            set_dl, reset_dl, set_cnt, reset_cnt;

  ring_counter #(.TAPS(TAPS)) u_ring (
    .clk, .rst_n, .en(1'b1), .taps(ring)
  );

  // Revolution counter: one count per pass of the ring through its last tap.
  mod_counter #(.N(NC)) u_rev (
    .clk, .rst_n, .en(ring[TAPS-1]), .count(rev)
  );

  tap_dff_bank #(.WIDTH(TAPS + NC)) u_dff (
    .clk, .rst_n, .d({rev, ring}), .q({rev_q, ring_q})
  );

  // Duty holding register, loaded in the last clock of a frame.
  always_ff @(posedge clk) begin
    if (!rst_n)                      duty_r <= '0;
    else if (ring[TAPS-1] && &rev)   duty_r <= duty;
  end

  // Bit split.
  assign {duty_coarse, duty_fine} = duty_r;

  tap_mux #(.SEL_BITS(ND)) u_mux (
    .in_bits(ring_q), .sel(duty_fine), .out_bit(mux_out)
  );

  always_comb begin
    set_dl    = ring_q[TAPS-1];
    reset_dl  = mux_out;
    set_cnt   = &rev_q;
    reset_cnt = (rev_q == duty_coarse);
  end

  sr_ff #(.SET_WINS(1'b1)) u_sr (
    .clk, .rst_n,
    .set  (set_dl   && set_cnt),
    .reset(reset_dl && reset_cnt),
    .q, .qn
  );

endmodule
