// ddpwm: ring-counter ("delay line") section of the hybrid DPWM.
//
// A one-hot ring counter of 2**DL_BITS stages circulates a single 1, one
// stage per clock, so each stage output is a tap delayed by one more clock.
// The taps feed a 2**DL_BITS:1 multiplexer whose select lines are the duty
// LSBs duty_lo; its output is RESET2. The last ring stage, re-timed through a
// D flip-flop, is SET2: it is high in the first cycle of every revolution.
// The last stage itself is brought out as `wrap`, which steps the counter of
// the counter-based section once per revolution.
//
// Reset loads the 1 into stage 0 and sets the SET2 flip-flop, so the first
// cycle after reset is the first cycle of a revolution. The ring and the
// multiplexer follow the source design; the reset values are this design's.
// An assertion checks that the ring always holds exactly one 1.
module ddpwm #(
  parameter int unsigned DL_BITS = hdpwm_pkg::DL_BITS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [DL_BITS-1:0] duty_lo,
  output logic               set2,
  output logic               reset2,
  output logic               wrap
);

  localparam int unsigned STAGES = 1 << DL_BITS;

  logic [STAGES-1:0] ring;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ring <= STAGES'(1);
      set2 <= 1'b1;
    end else begin
      ring <= {ring[STAGES-2:0], ring[STAGES-1]};
      set2 <= ring[STAGES-1];
    end
  end

  // The multiplexer: the tap chosen by the duty LSBs.
  assign reset2 = ring[duty_lo];
  assign wrap   = ring[STAGES-1];

  // Exactly one stage of the ring is ever active.
  a_ring_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(ring))
    else $error("ddpwm: ring counter lost its one-hot state");

endmodule
