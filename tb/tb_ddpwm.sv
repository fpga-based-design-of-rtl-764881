// tb_ddpwm: self-checking test of the ring-counter section at its default
// size (5 duty bits, 32 stages). With k = cycles since reset modulo 32, SET2
// must be high exactly when k == 0, wrap exactly when k == 31 and RESET2
// exactly when k equals the (randomly changing) duty LSBs. Also checks that
// SET2 recurs every 32 clocks.
module tb_ddpwm;
  localparam int unsigned DB = hdpwm_pkg::DL_BITS;
  localparam int unsigned ST = 1 << DB;
  logic clk = 1'b0;
  logic rst_n, set2, reset2, wrap;
  logic [DB-1:0] duty_lo;
  int checks = 0, failures = 0;
  int n, last_set;

  ddpwm dut (.clk, .rst_n, .duty_lo, .set2, .reset2, .wrap);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; duty_lo = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    last_set = -1;
    for (n = 0; n < 4000; n++) begin
      duty_lo = DB'($urandom);
      #1;
      checks++;
      if (set2 !== (n % ST == 0) || wrap !== (n % ST == ST - 1) ||
          reset2 !== (n % ST == int'(duty_lo))) begin
        failures++;
        $display("FAIL n=%0d duty_lo=%0d set2=%b wrap=%b reset2=%b", n, duty_lo, set2, wrap, reset2);
      end
      if (set2) begin
        if (last_set >= 0) begin
          checks++;
          if (n - last_set != ST) begin
            failures++;
            $display("FAIL SET2 period %0d", n - last_set);
          end
        end
        last_set = n;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
