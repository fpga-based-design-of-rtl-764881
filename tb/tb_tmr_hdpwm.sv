// tb_tmr_hdpwm: end-to-end test of the triple-modular-redundant hybrid DPWM
// generator with every parameter at its default (10-bit duty, 1024-clock
// period, three replicas).
//
// Each test period sets the common duty word and the fault injection at the
// period start, then checks every clock:
//   - each replica output against "1 <= n mod 1024 <= D_r", with D_r the duty
//     word that replica is given (the common word or the injected one);
//   - pwm_out against the same reference for the common duty word, i.e. the
//     fault must be voted out;
//   - error against "the three reference outputs are not all equal".
// At each period end the high time of pwm_out must equal the duty word.
// The first periods replay the three demonstration cases (duty words
// 0110000100, 0001111001 and 1010101010 with one replica given a different
// word), then corner cases and random periods follow. Counted mechanisms:
// a fault masked on each of the three replicas, the error flag raised, fault
// periods without a visible difference (injected word equal to the duty),
// injection with an out-of-range select, zero and full duty. A mechanism
// that never happens counts as a failure.
module tb_tmr_hdpwm;
  localparam int unsigned RB  = hdpwm_pkg::RES_BITS;
  localparam int unsigned PER = 1 << RB;
  localparam int NPER = 20;

  logic clk = 1'b0;
  logic rst_n;
  logic [RB-1:0] duty, inj_duty;
  logic inj_en;
  logic [1:0] inj_sel;
  logic pwm_out, error;
  logic [2:0] pwm_rep;

  int checks = 0, failures = 0;
  int p_duty[NPER], p_inj[NPER], p_en[NPER], p_sel[NPER];
  int d_rep[3];
  int n, ph, p, hi_count;
  logic [2:0] exp_rep;
  logic exp_out, exp_err;
  int masked[3];
  int err_cycles, hidden_fault, bad_sel, zero_duty, full_duty;

  tmr_hdpwm dut (
    .clk, .rst_n, .duty, .inj_en, .inj_sel, .inj_duty,
    .pwm_out, .error, .pwm_rep
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat ((NPER + 4) * PER) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_period(int i, int d, int en, int sel, int dinj);
    p_duty[i] = d; p_en[i] = en; p_sel[i] = sel; p_inj[i] = dinj;
  endtask

  function automatic logic ref_pwm(int phase, int d);
    return phase >= 1 && phase <= d;
  endfunction

  initial begin
    // The three demonstration cases: two replicas agree, one differs.
    set_period(0, 'b0110000100, 0, 0, 0);
    set_period(1, 'b0110000100, 1, 2, 'b0001111001);
    set_period(2, 'b0001111001, 1, 1, 'b1010101010);
    set_period(3, 'b1010101010, 1, 0, 'b0110000100);
    // Corner cases.
    set_period(4, 0,    1, 1, 1023);
    set_period(5, 1023, 1, 2, 0);
    set_period(6, 500,  1, 3, 7);      // select outside the replicas
    set_period(7, 600,  1, 0, 600);    // injected word equals the duty
    set_period(8, 1023, 0, 0, 0);
    set_period(9, 0,    0, 0, 0);
    for (int i = 10; i < NPER; i++)
      set_period(i, int'($urandom % PER), int'($urandom % 2), int'($urandom % 4),
                 int'($urandom % PER));

    foreach (masked[i]) masked[i] = 0;
    err_cycles = 0; hidden_fault = 0; bad_sel = 0; zero_duty = 0; full_duty = 0;

    rst_n = 1'b0; duty = '0; inj_en = 1'b0; inj_sel = '0; inj_duty = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    hi_count = 0;
    for (n = 0; n < NPER * PER + 1; n++) begin
      ph = n % PER;
      p  = n / PER;
      if (ph == 0) begin
        if (n > 0) begin
          checks++;
          if (hi_count != p_duty[p - 1]) begin
            failures++;
            $display("FAIL period %0d: pwm_out high %0d clocks, expected %0d", p - 1, hi_count, p_duty[p - 1]);
          end
        end
        hi_count = 0;
        if (p < NPER) begin
          duty     = RB'(p_duty[p]);
          inj_en   = 1'(p_en[p]);
          inj_sel  = 2'(p_sel[p]);
          inj_duty = RB'(p_inj[p]);
          for (int r = 0; r < 3; r++)
            d_rep[r] = (p_en[p] != 0 && p_sel[p] == r) ? p_inj[p] : p_duty[p];
          if (p_en[p] != 0 && p_sel[p] == 3) bad_sel++;
          if (p_en[p] != 0 && p_sel[p] < 3 && p_inj[p] == p_duty[p]) hidden_fault++;
          if (p_duty[p] == 0) zero_duty++;
          if (p_duty[p] == PER - 1) full_duty++;
        end
      end
      #1;
      for (int r = 0; r < 3; r++) exp_rep[r] = ref_pwm(ph, d_rep[r]);
      exp_out = ref_pwm(ph, int'(duty));
      exp_err = !(exp_rep == 3'b000 || exp_rep == 3'b111);
      checks++;
      if (pwm_rep !== exp_rep || pwm_out !== exp_out || error !== exp_err) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d rep=%b/%b out=%b/%b err=%b/%b", n, pwm_rep, exp_rep,
                   pwm_out, exp_out, error, exp_err);
      end
      if (error) begin
        err_cycles++;
        for (int r = 0; r < 3; r++)
          if (pwm_rep[r] != pwm_out && pwm_out == exp_out) masked[r]++;
      end
      if (pwm_out) hi_count++;
      @(negedge clk);
    end

    $display("mechanisms: masked faults on replicas 0/1/2 = %0d/%0d/%0d cycles, error cycles = %0d",
             masked[0], masked[1], masked[2], err_cycles);
    $display("mechanisms: invisible faults = %0d, out-of-range select = %0d, zero duty = %0d, full duty = %0d",
             hidden_fault, bad_sel, zero_duty, full_duty);
    for (int r = 0; r < 3; r++) begin
      checks++;
      if (masked[r] == 0) begin failures++; $display("FAIL no masked fault on replica %0d", r); end
    end
    checks++; if (err_cycles == 0)   begin failures++; $display("FAIL error flag never raised"); end
    checks++; if (hidden_fault == 0) begin failures++; $display("FAIL no invisible fault"); end
    checks++; if (bad_sel == 0)      begin failures++; $display("FAIL no out-of-range select"); end
    checks++; if (zero_duty == 0)    begin failures++; $display("FAIL no zero duty"); end
    checks++; if (full_duty == 0)    begin failures++; $display("FAIL no full duty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
