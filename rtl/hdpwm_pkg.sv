// hdpwm_pkg: constants and types shared by the triple-modular-redundant
// hybrid DPWM generator.
//
// The duty-cycle word is RES_BITS = 10 bits wide (a 1024-step PWM). It is
// split into CNT_BITS = 5 most significant bits for the counter-based section
// and DL_BITS = 5 least significant bits for the ring-counter ("delay line")
// section, which is the split of the hybrid generator. Three replicas of the
// generator are voted 2-out-of-3. No logic lives here, only constants and the
// duty_t type.
package hdpwm_pkg;

  // Resolution of the duty-cycle word.
  localparam int unsigned RES_BITS = 10;
  // Bits of the duty word handled by the up counter (the MSBs).
  localparam int unsigned CNT_BITS = 5;
  // Bits handled by the ring counter and its multiplexer (the LSBs).
  localparam int unsigned DL_BITS  = RES_BITS - CNT_BITS;
  // Number of redundant generator copies.
  localparam int unsigned N_REP    = 3;

  typedef logic [RES_BITS-1:0] duty_t;

endpackage
