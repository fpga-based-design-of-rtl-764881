// hdpwm: hybrid digital PWM generator.
//
// The RES_BITS-bit duty word is split: the CNT_BITS MSBs go to the
// counter-based section (cdpwm), the remaining DL_BITS LSBs to the
// ring-counter section (ddpwm). The ring counter sweeps one counter step in
// 2**DL_BITS clocks and steps the counter at the end of each sweep, so the
// pair acts as a RES_BITS-bit time base. The period start is
// SET = SET1 & SET2 (counter at zero and ring in its first stage); the pulse
// end is RESET = RESET1 & RESET2 (counter equal to the duty MSBs and the ring
// at the tap chosen by the duty LSBs). An SR flip-flop, reset winning, holds
// the output.
//
// Timing: the period is 2**RES_BITS clocks. With duty word D, pwm is high for
// exactly D clocks of each period: if SET is seen in cycle 0 of a period,
// RESET is seen in cycle D and pwm is high in cycles 1..D, so D = 0
// gives a constant low and the largest word gives (2**RES_BITS-1)/2**RES_BITS.
// The duty word is compared directly, as in the source design; change it in
// the cycle that SET is seen (or while pwm is low after RESET) to avoid a
// missed RESET in the changed period.
module hdpwm
#(
  parameter int unsigned RES_BITS = hdpwm_pkg::RES_BITS,
  parameter int unsigned CNT_BITS = hdpwm_pkg::CNT_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [RES_BITS-1:0] duty,
  output logic                pwm
);

  localparam int unsigned DLB = RES_BITS - CNT_BITS;

  if (CNT_BITS < 1 || DLB < 1) begin : g_bad_split
    $error("hdpwm: both sections need at least one duty bit");
  end

  logic set1, reset1, set2, reset2, wrap;
  logic set, reset;

  ddpwm #(.DL_BITS(DLB)) u_ddpwm (
    .clk     (clk),
    .rst_n   (rst_n),
    .duty_lo (duty[DLB-1:0]),
    .set2    (set2),
    .reset2  (reset2),
    .wrap    (wrap)
  );

  cdpwm #(.CNT_BITS(CNT_BITS)) u_cdpwm (
    .clk     (clk),
    .rst_n   (rst_n),
    .advance (wrap),
    .duty_hi (duty[RES_BITS-1:DLB]),
    .set1    (set1),
    .reset1  (reset1)
  );

  // The two AND gates that merge the sections.
  assign set   = set1 & set2;
  assign reset = reset1 & reset2;

  sr_ff u_sr (
    .clk   (clk),
    .rst_n (rst_n),
    .set   (set),
    .reset (reset),
    .q     (pwm)
  );

endmodule
