// tmr_hdpwm: triple-modular-redundant hybrid DPWM generator (top level).
//
// One duty word drives three identical hybrid DPWM generators (hdpwm) that
// share the clock and reset and so run in lock step. A fault injector sits on
// their duty inputs: while inj_en is high, replica inj_sel gets inj_duty
// instead of duty. The three PWM outputs go to a 2-out-of-3 majority voter;
// pwm_out is the voted output, error is high in every cycle in which the
// replicas disagree, and pwm_rep brings out the three replica outputs.
//
// Timing: the PWM period is 2**RES_BITS clocks (1024 by default) and pwm_out
// is high for `duty` clocks of each period, starting one clock after the
// period start. A fault on one replica leaves pwm_out unchanged; error then
// marks the cycles in which that replica differs. The structure (three
// replicas, fault injection on the duty input, majority voter with an error
// output) follows the source design; port names and encodings are this
// design's own.
module tmr_hdpwm
#(
  parameter int unsigned RES_BITS = hdpwm_pkg::RES_BITS,
  parameter int unsigned CNT_BITS = hdpwm_pkg::CNT_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [RES_BITS-1:0] duty,
  input  logic                inj_en,
  input  logic [1:0]          inj_sel,
  input  logic [RES_BITS-1:0] inj_duty,
  output logic                pwm_out,
  output logic                error,
  output logic [2:0]          pwm_rep
);

  logic [2:0][RES_BITS-1:0] duty_rep;

  fault_injector #(.RES_BITS(RES_BITS), .N_REP(hdpwm_pkg::N_REP)) u_inj (
    .duty     (duty),
    .inj_en   (inj_en),
    .inj_sel  (inj_sel),
    .inj_duty (inj_duty),
    .duty_rep (duty_rep)
  );

  for (genvar i = 0; i < 3; i++) begin : g_rep
    hdpwm #(.RES_BITS(RES_BITS), .CNT_BITS(CNT_BITS)) u_hdpwm (
      .clk   (clk),
      .rst_n (rst_n),
      .duty  (duty_rep[i]),
      .pwm   (pwm_rep[i])
    );
  end

  majority_voter u_mv (
    .in    (pwm_rep),
    .voted (pwm_out),
    .error (error)
  );

endmodule
