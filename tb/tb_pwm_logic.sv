// Self-checking test of the PWM source selection.
//
// All 32 input combinations are applied and compared with the priority
// rule written out as a truth table: a fresh positive step forces the switch
// on, a fresh negative step forces it off, then the charge-balance
// controller's on/off demands, otherwise the DPWM output passes.
`timescale 1ns / 1ps
module tb_pwm_logic;
  int checks = 0, failures = 0;
  logic pwm_out, pwm_pos, pwm_neg, pos_step, neg_step, pwm;

  pwm_logic dut (.pwm_out, .pwm_pos, .pwm_neg, .pos_step, .neg_step, .pwm);

  // expected output for {pos_step, neg_step, pwm_pos, pwm_neg, pwm_out}
  localparam logic [31:0] TABLE = {
    16'hFFFF,                     // pos_step = 1: always on
    8'h00,                        // neg_step = 1: always off
    4'hF,                         // pwm_pos = 1: on
    2'b00,                        // pwm_neg = 1: off
    2'b10                         // DPWM passes
  };

  initial begin
    for (int v = 0; v < 32; v++) begin
      {pos_step, neg_step, pwm_pos, pwm_neg, pwm_out} = 5'(v);
      #1;
      checks++;
      if (pwm !== TABLE[v]) begin
        failures++;
        $display("FAIL: inputs %05b gave %0b, expected %0b", 5'(v), pwm, TABLE[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
