// sr_ff: clocked SR flip-flop with Q and Q' outputs.
//
// Every DPWM generator ends in this flip-flop: SET starts the pulse and
// RESET ends it. On each rising clock edge Q becomes 1 if SET is high, 0 if
// RESET is high, and otherwise keeps its value. When both are high the
// parameter SET_WINS decides: 0 lets RESET win (counter-based generator,
// duty 0 -> always low), 1 lets SET win (ring-counter generators, full
// duty -> always high). The published design leaves this case and the
// reset open; both are this design's choice.
//
// Timing: Q follows SET/RESET one clock later. rst_n is synchronous and
// active low and clears Q.
module sr_ff #(
  parameter bit SET_WINS = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic set,
  input  logic reset,
  output logic q,
  output logic qn
);

  always_ff @(posedge clk) begin
    if (!rst_n)               q <= 1'b0;
    else if (set && reset)    q <= SET_WINS;
    else if (set)             q <= 1'b1;
    else if (reset)           q <= 1'b0;
  end

  assign qn = ~q;

endmodule
