// tb_hdpwm: self-checking test of one hybrid DPWM generator at the default
// 10-bit resolution (5 counter bits, 5 ring bits). The duty word is changed
// at each period start, through corner values (0, 1, 31, 32, 33, 1023), the
// three duty words of the TMR demonstration and random words. In every cycle
// pwm must equal the reference "1 <= n mod 1024 <= D", where n counts clocks
// since reset; the high time of each period must be D clocks and the rising
// edges must be 1024 clocks apart.
module tb_hdpwm;
  localparam int unsigned RB  = hdpwm_pkg::RES_BITS;
  localparam int unsigned PER = 1 << RB;
  localparam int NDUTY = 24;
  logic clk = 1'b0;
  logic rst_n, pwm, pwm_q;
  logic [RB-1:0] duty;
  int checks = 0, failures = 0;
  int duties[NDUTY];
  int n, ph, hi_count, last_rise;

  hdpwm dut (.clk, .rst_n, .duty, .pwm);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat ((NDUTY + 4) * PER) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    duties[0] = 0;   duties[1] = 1;    duties[2] = 31;  duties[3] = 32;
    duties[4] = 33;  duties[5] = 1023; duties[6] = 388; duties[7] = 121;
    duties[8] = 682; duties[9] = 512;  duties[10] = 1023;
    for (int i = 11; i < NDUTY; i++) duties[i] = int'($urandom % PER);

    rst_n = 1'b0; duty = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    hi_count = 0; last_rise = -1; pwm_q = 1'b0;
    for (n = 0; n < NDUTY * PER + 1; n++) begin
      ph = n % PER;
      if (ph == 0) begin
        if (n > 0) begin
          checks++;
          if (hi_count != duties[n / PER - 1]) begin
            failures++;
            $display("FAIL period %0d high for %0d clocks, expected %0d", n / PER - 1, hi_count, duties[n / PER - 1]);
          end
        end
        hi_count = 0;
        if (n / PER < NDUTY) duty = RB'(duties[n / PER]);
      end
      #1;
      checks++;
      if (pwm !== (ph >= 1 && ph <= int'(duty))) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d duty=%0d pwm=%b", n, duty, pwm);
      end
      if (pwm) hi_count++;
      if (pwm && !pwm_q) begin
        if (last_rise >= 0) begin
          checks++;
          if ((n - last_rise) % PER != 0) begin
            failures++;
            $display("FAIL rising edges %0d clocks apart", n - last_rise);
          end
        end
        last_rise = n;
      end
      pwm_q = pwm;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
