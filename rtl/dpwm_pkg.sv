// dpwm_pkg: constants and types shared by the DPWM generators.
//
// The default resolution is 8 bits: one switching period is 2^8 = 256
// clocks, so the clock must run at 256 times the switching frequency
// (16 MHz switching needs a 4.096 GHz clock). The hybrid generator splits
// the 8-bit duty word into 3 coarse bits (revolution counter) and 5 fine
// bits (32-tap ring counter); the sizes follow the published design, the
// assignment of high bits to the counter is this design's choice.
package dpwm_pkg;

  localparam int unsigned DPWM_BITS     = 8;  // duty resolution
  localparam int unsigned HYB_RING_BITS = 5;  // hybrid: ring-counter part;
                                              // counter part = DPWM_BITS - 5 = 3

  // Which generator drives the power switch in dpwm_top.
  typedef enum logic [1:0] {
    GEN_CDPWM = 2'd0,  // counter based
    GEN_DDPWM = 2'd1,  // delay-line (ring counter) based
    GEN_HDPWM = 2'd2   // hybrid
  } gen_sel_e;

endpackage
