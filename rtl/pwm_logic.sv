// PWM source selection ("Logic" block of the controller).
//
// Decides what drives the power switch: the DPWM output of the voltage-mode
// PID loop in steady state, or the constant 100 % / 0 % duty demanded by the
// charge-balance controller during a load transient. A fresh step pulse from
// the load-step detector overrides at once, so the switch reacts in the same
// 20 MHz sample in which the step is seen, before the charge-balance
// controller has registered it; the newest event has the highest priority:
//     pos_step            -> switch on
//     neg_step            -> switch off
//     pwm_pos (from CBC)  -> switch on
//     pwm_neg (from CBC)  -> switch off
//     otherwise           -> DPWM output
// The block is combinational so the 5 ns DPWM edges pass unchanged; the
// clock inputs drawn in the block diagram are therefore not needed. The
// priority order is this design's choice.
`timescale 1ns / 1ps
module pwm_logic (
  input  logic pwm_out,    // DPWM output (voltage-mode control)
  input  logic pwm_pos,    // CBC: force switch on
  input  logic pwm_neg,    // CBC: force switch off
  input  logic pos_step,   // positive load step just detected
  input  logic neg_step,   // negative load step just detected
  output logic pwm         // gate-driver command, 1 = high-side switch on
);
  always_comb begin
    if (pos_step)      pwm = 1'b1;
    else if (neg_step) pwm = 1'b0;
    else if (pwm_pos)  pwm = 1'b1;
    else if (pwm_neg)  pwm = 1'b0;
    else               pwm = pwm_out;
  end
endmodule
