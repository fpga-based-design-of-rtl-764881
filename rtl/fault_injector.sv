// fault_injector: fault injection on the duty-cycle inputs of the replicas.
//
// Every replica normally receives the common duty word. While inj_en is high,
// the replica numbered inj_sel (0 .. N_REP-1) receives inj_duty instead,
// which models a fault on that replica's duty input. An inj_sel outside the
// replica range injects nothing. Purely combinational.
//
// That faults are injected on the duty input follows the source design; the
// enable/select/value interface is this design's choice.
module fault_injector #(
  parameter int unsigned RES_BITS = hdpwm_pkg::RES_BITS,
  parameter int unsigned N_REP    = hdpwm_pkg::N_REP
) (
  input  logic [RES_BITS-1:0]            duty,
  input  logic                           inj_en,
  input  logic [$clog2(N_REP)-1:0]       inj_sel,
  input  logic [RES_BITS-1:0]            inj_duty,
  output logic [N_REP-1:0][RES_BITS-1:0] duty_rep
);

  always_comb begin
    for (int i = 0; i < N_REP; i++) begin
      duty_rep[i] = (inj_en && int'(inj_sel) == i) ? inj_duty : duty;
    end
  end

endmodule
