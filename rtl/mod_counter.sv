// mod_counter: N-bit binary up-counter with count enable.
//
// Counts 0, 1, ..., 2^N-1, 0, ... advancing by one on each clock with en
// high. It is the carrier of the counter-based generator (en tied high, one
// count per clock) and the revolution counter of the hybrid generator (en
// high once per ring revolution). Synchronous active-low reset to 0; the
// counting direction and reset are this design's choice.
module mod_counter #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [N-1:0] count
);

  always_ff @(posedge clk) begin
    if (!rst_n)  count <= '0;
    else if (en) count <= count + 1'b1;
  end

endmodule
