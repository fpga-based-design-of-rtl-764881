// majority_voter: 2-out-of-3 voter over the outputs of the three replicas.
//
// voted is high when at least two of the three inputs are high, so a single
// faulty replica is outvoted by the two that agree. error is high whenever
// the three inputs are not all equal, i.e. a replica disagrees with the
// others in this cycle. Both outputs are combinational. The voting follows
// the source design; defining the error flag as "any disagreement" is this
// design's reading of it.
module majority_voter (
  input  logic [2:0] in,
  output logic       voted,
  output logic       error
);

  assign voted = (in[0] & in[1]) | (in[1] & in[2]) | (in[0] & in[2]);
  assign error = (in[0] ^ in[1]) | (in[1] ^ in[2]);

endmodule
