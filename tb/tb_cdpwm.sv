// tb_cdpwm: self-checking test of the counter section at its default width
// (5 bits). A reference counter steps on a random `advance`; SET1 must be
// high exactly at count 0 and RESET1 exactly at count == duty_hi. A second
// phase holds `advance` high and checks that SET1 recurs every 2**CNT_BITS
// clocks.
module tb_cdpwm;
  localparam int unsigned CB = hdpwm_pkg::CNT_BITS;
  logic clk = 1'b0;
  logic rst_n, advance, set1, reset1;
  logic [CB-1:0] duty_hi, cnt_ref;
  int checks = 0, failures = 0;
  int last_set, n;

  cdpwm dut (.clk, .rst_n, .advance, .duty_hi, .set1, .reset1);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs();
    checks++;
    if (set1 !== (cnt_ref == 0) || reset1 !== (cnt_ref == duty_hi)) begin
      failures++;
      $display("FAIL count=%0d duty_hi=%0d set1=%b reset1=%b", cnt_ref, duty_hi, set1, reset1);
    end
  endtask

  initial begin
    rst_n = 1'b0; advance = 1'b0; duty_hi = '0; cnt_ref = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      advance = 1'($urandom);
      duty_hi = CB'($urandom);
      #1 check_outputs();
      @(posedge clk);
      if (advance) cnt_ref = cnt_ref + 1'b1;
      @(negedge clk);
    end
    // Period check with the counter stepping every clock.
    advance = 1'b1;
    last_set = -1;
    n = 0;
    for (int i = 0; i < 10 * (1 << CB); i++) begin
      #1 check_outputs();
      if (set1) begin
        if (last_set >= 0) begin
          checks++;
          if (n - last_set != (1 << CB)) begin
            failures++;
            $display("FAIL period %0d, expected %0d", n - last_set, 1 << CB);
          end
        end
        last_set = n;
      end
      @(posedge clk);
      cnt_ref = cnt_ref + 1'b1;
      n++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
