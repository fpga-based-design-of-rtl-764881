// tb_majority_voter: exhaustive test of the 2-out-of-3 voter. The expected
// vote is computed by counting ones; the error flag must be high exactly
// when the three inputs are not all equal.
module tb_majority_voter;
  logic [2:0] in;
  logic voted, error;
  int checks = 0, failures = 0;

  majority_voter dut (.in, .voted, .error);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 8; v++) begin
        in = 3'(v);
        #1;
        checks++;
        if (voted !== ($countones(in) >= 2) || error !== (in != 3'b000 && in != 3'b111)) begin
          failures++;
          $display("FAIL in=%b voted=%b error=%b", in, voted, error);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
