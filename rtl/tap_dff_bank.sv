// tap_dff_bank: one D flip-flop per ring-counter tap.
//
// In the delay-line generator each ring-counter output reaches the tap
// multiplexer through its own D flip-flop; the flip-flop of the last tap
// also supplies SET. The bank delays all WIDTH bits by one clock. The
// synchronous active-low reset clears it (this design's choice).
module tap_dff_bank #(
  parameter int unsigned WIDTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
