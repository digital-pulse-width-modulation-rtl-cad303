// ring_counter: one-hot ring counter with TAPS outputs.
//
// This is the synchronous "delay line" of the delay-line and hybrid DPWM
// generators: exactly one tap is high, and while en is high it moves one
// tap per clock from tap i to tap i+1, wrapping from tap TAPS-1 back to
// tap 0. A full revolution therefore takes TAPS clocks. After the
// synchronous active-low reset tap 0 is high (the start value is this
// design's choice).
module ring_counter #(
  parameter int unsigned TAPS = 256
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  output logic [TAPS-1:0] taps
);

  always_ff @(posedge clk) begin
    if (!rst_n)  taps <= TAPS'(1);
    else if (en) taps <= {taps[TAPS-2:0], taps[TAPS-1]};
  end

  // Exactly one tap is high at all times after reset.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(taps));

endmodule
