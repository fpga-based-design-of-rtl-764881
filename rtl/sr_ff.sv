// sr_ff: set/reset flip-flop that turns the SET and RESET pulses of a DPWM
// into its output level.
//
// On each rising clock edge q goes to 0 when reset is high, otherwise to 1
// when set is high, otherwise it holds. Reset wins over set, so that a duty
// cycle of zero (SET and RESET in the same cycle) gives a permanently low
// output; this priority is a choice of this design. rst_n clears q
// asynchronously. q changes one clock cycle after the pulse that caused it.
module sr_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic set,
  input  logic reset,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= 1'b0;
    else if (reset) q <= 1'b0;
    else if (set)   q <= 1'b1;
  end

endmodule
