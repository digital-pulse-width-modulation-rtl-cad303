// tap_mux: 2^SEL_BITS : 1 multiplexer.
//
// Selects in_bits[sel]. In the delay-line generator sel is the duty word
// and the inputs are the registered ring-counter taps, so the output pulses
// when the ring reaches the tap named by the duty word; that pulse resets
// the output flip-flop. Purely combinational.
module tap_mux #(
  parameter int unsigned SEL_BITS = 8
) (
  input  logic [(1<<SEL_BITS)-1:0] in_bits,
  input  logic [SEL_BITS-1:0]      sel,
  output logic                     out_bit
);

  always_comb out_bit = in_bits[sel];

endmodule
