// tb_fault_injector: exhaustive over enable and select, random duty words.
// Each replica must see inj_duty only when injection is enabled and selects
// it, and the common duty word otherwise (select 3 selects nobody).
module tb_fault_injector;
  localparam int unsigned RB = hdpwm_pkg::RES_BITS;
  logic [RB-1:0] duty, inj_duty;
  logic inj_en;
  logic [1:0] inj_sel;
  logic [2:0][RB-1:0] duty_rep;
  int checks = 0, failures = 0;

  fault_injector dut (.duty, .inj_en, .inj_sel, .inj_duty, .duty_rep);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int e = 0; e < 2; e++) begin
        for (int s = 0; s < 4; s++) begin
          duty = RB'($urandom);
          inj_duty = RB'($urandom);
          if (t == 0) inj_duty = ~duty;   // make sure the two differ
          inj_en = 1'(e);
          inj_sel = 2'(s);
          #1;
          for (int r = 0; r < 3; r++) begin
            checks++;
            if (duty_rep[r] !== ((e == 1 && s == r) ? inj_duty : duty)) begin
              failures++;
              $display("FAIL en=%0d sel=%0d replica %0d got %h", e, s, r, duty_rep[r]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
