// buck_converter_model: behavioural (not synthesizable) model of the buck
// converter power stage, for testbenches only.
//
// Circuit: a switch from vin to the switching node while `gate` is high, a
// free-wheeling diode to ground while it is low, a series inductor L with
// resistance ESR_L, and an output capacitor C with series resistance ESR_C
// in parallel with the load r_load. Default component values are those of
// the converter the DPWM block was designed for: L = 16 uH, C = 15 nF,
// ESR_L = 16 uOhm, ESR_C = 0.6 mOhm; vin and r_load are inputs so that line
// and load steps can be applied. Ideally switched, steady state
// vout = duty * vin.
//
// The state (inductor current il, capacitor voltage vc) is advanced by one
// forward-Euler step of DT seconds at every rising clock edge, DT being the
// DPWM clock period (1 / (256 * 16 MHz) by default). When the diode
// conducts and il would reverse, il is held at zero (discontinuous mode).
`timescale 1ns/1ps
module buck_converter_model #(
  parameter real DT    = 1.0 / 4.096e9,
  parameter real L     = 16.0e-6,
  parameter real C     = 15.0e-9,
  parameter real ESR_L = 16.0e-6,
  parameter real ESR_C = 0.6e-3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic gate,
  input  real  vin,
  input  real  r_load,
  output real  vout,
  output real  il
);

  real vc = 0.0;
  real vsw, ic, il_next;

  initial il = 0.0;

  always_comb vout = (vc + ESR_C * il) / (1.0 + ESR_C / r_load);

  always @(posedge clk) begin
    if (!rst_n) begin
      il <= 0.0;
      vc <= 0.0;
    end else begin
      vsw     = gate ? vin : 0.0;
      ic      = il - vout / r_load;
      il_next = il + DT * (vsw - ESR_L * il - vout) / L;
      if (!gate && il_next < 0.0) il_next = 0.0;
      il <= il_next;
      vc <= vc + DT * ic / C;
    end
  end

endmodule
