// cdpwm: counter-based section of the hybrid DPWM (leading-edge type).
//
// An up counter of CNT_BITS bits is the sawtooth carrier. One comparator
// detects the counter at zero and gives SET1; a second compares the counter
// with the duty-cycle bits duty_hi and gives RESET1. Both outputs are
// combinational functions of the counter register.
//
// In the hybrid generator the counter does not step on every clock: it steps
// when `advance` is high, which the ring-counter section asserts once per ring
// revolution, so one counter step lasts 2**DL_BITS clocks. Driving `advance`
// high permanently gives a plain counter DPWM with a period of 2**CNT_BITS
// clocks. The counter wraps from all-ones to zero; its period is therefore
// its full count range, as in the source design. Reset sets the counter to 0.
module cdpwm #(
  parameter int unsigned CNT_BITS = hdpwm_pkg::CNT_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                advance,
  input  logic [CNT_BITS-1:0] duty_hi,
  output logic                set1,
  output logic                reset1
);

  logic [CNT_BITS-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       count <= '0;
    else if (advance) count <= count + 1'b1;
  end

  // Zero match starts the period; duty match ends the pulse.
  assign set1   = (count == '0);
  assign reset1 = (count == duty_hi);

endmodule
