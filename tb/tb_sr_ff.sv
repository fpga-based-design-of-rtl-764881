// tb_sr_ff: self-checking test of the SR flip-flop.
// Drives random set/reset for 2000 cycles plus the corner cases (both high,
// reset during hold) and compares q with a reference model each cycle.
module tb_sr_ff;
  logic clk = 1'b0;
  logic rst_n, set, reset, q;
  logic q_ref;
  int checks = 0, failures = 0;

  sr_ff dut (.clk, .rst_n, .set, .reset, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic s, input logic r);
    set = s; reset = r;
    @(posedge clk);
    if (r) q_ref = 1'b0; else if (s) q_ref = 1'b1;
    @(negedge clk);
    checks++;
    if (q !== q_ref) begin
      failures++;
      $display("FAIL set=%b reset=%b q=%b expected %b", s, r, q, q_ref);
    end
  endtask

  initial begin
    rst_n = 1'b0; set = 1'b1; reset = 1'b0; q_ref = 1'b0;
    repeat (2) @(negedge clk);
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL q not cleared by reset"); end
    rst_n = 1'b1;
    step(1'b1, 1'b0);   // set
    step(1'b0, 1'b0);   // hold high
    step(1'b1, 1'b1);   // both: reset wins
    step(1'b0, 1'b0);   // hold low
    step(1'b1, 1'b0);
    step(1'b0, 1'b1);   // reset
    for (int i = 0; i < 2000; i++) step(1'($urandom), 1'($urandom));
    // asynchronous reset while q is high
    step(1'b1, 1'b0);
    #2 rst_n = 1'b0; #1;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL asynchronous reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
