// dpwm_top: the digital PWM block of a DC-DC buck converter controller.
//
// The controller's duty word (the output of the ADC in the converter's
// control loop) enters as `duty`. The three generators - counter based
// (cdpwm), delay-line based (ddpwm) and hybrid (hdpwm) - all run from the
// same clock and the same duty word, each producing a PWM signal with a
// period of 2^N clocks. gen_sel picks the one that drives the power switch
// (pwm_q) and its complement (pwm_qn); all three outputs are also brought
// out on pwm_all for comparison. Having all three side by side behind a
// selector is this design's arrangement: the published models use one
// generator at a time.
//
// Transfer: cdpwm is high for duty clocks per period, ddpwm and hdpwm for
// duty+1 clocks (see the generator files). The switching frequency is
// F_clk / 2^N. rst_n is synchronous and active low. pwm_q follows the
// selected generator's flip-flop combinationally. An assertion flags a
// gen_sel value that names no generator (pwm_q is then held low).
module dpwm_top
  import dpwm_pkg::*;
#(
  parameter int unsigned N      = DPWM_BITS,
  parameter int unsigned HYB_ND = HYB_RING_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] duty,
  input  gen_sel_e     gen_sel,
  output logic         pwm_q,
  output logic         pwm_qn,
  output logic [2:0]   pwm_all
);

  logic q_c, q_d, q_h;
  logic qn_c, qn_d, qn_h;

  cdpwm #(.N(N)) u_cdpwm (
    .clk, .rst_n, .duty, .q(q_c), .qn(qn_c)
  );

  ddpwm #(.N(N)) u_ddpwm (
    .clk, .rst_n, .duty, .q(q_d), .qn(qn_d)
  );

  hdpwm #(.N(N), .ND(HYB_ND)) u_hdpwm (
    .clk, .rst_n, .duty, .q(q_h), .qn(qn_h)
  );

  always_comb begin
    unique case (gen_sel)
      GEN_CDPWM: begin pwm_q = q_c; pwm_qn = qn_c; end
      GEN_DDPWM: begin pwm_q = q_d; pwm_qn = qn_d; end
      GEN_HDPWM: begin pwm_q = q_h; pwm_qn = qn_h; end
      default:   begin pwm_q = 1'b0; pwm_qn = 1'b1; end
    endcase
  end

  assign pwm_all = {q_h, q_d, q_c};

  // gen_sel must name one of the three generators.
  a_sel_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                gen_sel inside {GEN_CDPWM, GEN_DDPWM, GEN_HDPWM});

endmodule
