// Digital buck-converter controller with charge-balance transient control.
//
// In steady state a voltage-mode loop regulates the output: the PID
// compensator turns the sampled voltage error into a duty value once per
// switching period and the DPWM turns it into the switch command. When the
// load current jumps by more than a threshold, the charge-balance controller
// takes the switch: full on (or off) until the capacitor charge lost since
// the step is balanced by the charge to come, then the opposite state for the
// computed return time, then back to the PID loop. Further steps during a
// transient (successive load changes) re-arm the drive phase.
//
// Structure (as in the published FPGA block diagram): PID compensator, DPWM, and the CBC group of
// load-step detector, capacitor-current zero-crossing block and charge-balance
// controller, joined by the PWM selection logic.
//
// Clocks: clk200, clk100 and clk20 come from one PLL (4x, 2x and 2/5 of a
// 50 MHz reference) with coinciding rising edges; clk20 also clocks the
// three converters. reset is an asynchronous,
// active-high reset; initialize re-initialises the PID. vo is the 10-bit
// voltage-error converter code (mid-scale = no error), io and il the 10-bit
// load and inductor current codes on one common scale. The three converters
// are sampled on clk20; the PID uses the
// vo code of the sample current at the start of each switching period.
// pwm drives the gate driver (1 = high-side switch on). overflow and
// dpw_valid are the PID's saturation flag and result strobe; cbc_active
// shows that a charge-balance transient is running.
`timescale 1ns / 1ps
module cbc_top #(
  parameter int unsigned PERIOD    = 800,   // DPWM counts per switching period
  parameter int unsigned D_INIT    = 4915,  // initial duty, Q14 (Vo/Vin)
  parameter int unsigned THRESHOLD = 64,    // load-step threshold in io codes
  parameter int unsigned VG_MV     = cbc_pkg::VG_MV_DEF,
  parameter int unsigned VO_MV     = cbc_pkg::VO_MV_DEF
) (
  input  logic                        clk200,
  input  logic                        clk100,
  input  logic                        clk20,
  input  logic                        reset,
  input  logic                        initialize,
  input  logic [cbc_pkg::ADC_W-1:0]   vo,
  input  logic [cbc_pkg::ADC_W-1:0]   io,
  input  logic [cbc_pkg::ADC_W-1:0]   il,
  output logic                        pwm,
  output logic                        overflow,
  output logic                        dpw_valid,
  output logic                        cbc_active
);
  import cbc_pkg::*;

  logic                    load;
  logic [DUTY_W-1:0]       duty;
  logic                    pwm_out;
  logic                    pos_step, neg_step;
  logic signed [IC_W-1:0]  ic;
  logic                    ic_zero;
  logic                    pwm_pos, pwm_neg;

  compensator #(
    .D_INIT (D_INIT)
  ) u_pid (
    .clk100     (clk100),
    .reset      (reset),
    .initialize (initialize),
    .hold       (cbc_active),
    .data_in    (vo),
    .load       (load),
    .duty       (duty),
    .dpw_valid  (dpw_valid),
    .overflow   (overflow)
  );

  dpwm #(
    .PERIOD (PERIOD),
    .D_INIT ((D_INIT * PERIOD + 8192) / 16384)
  ) u_dpwm (
    .clk200  (clk200),
    .clk100  (clk100),
    .reset   (reset),
    .data_in (duty),
    .valid   (dpw_valid),
    .load    (load),
    .pwm_out (pwm_out)
  );

  load_step #(
    .THRESHOLD (THRESHOLD)
  ) u_load_step (
    .clk20    (clk20),
    .reset    (reset),
    .io       (io),
    .pos_step (pos_step),
    .neg_step (neg_step)
  );

  crosszero u_crosszero (
    .clk20    (clk20),
    .reset    (reset),
    .io       (io),
    .il       (il),
    .pos_step (pos_step),
    .neg_step (neg_step),
    .ic       (ic),
    .ic_zero  (ic_zero)
  );

  cbc #(
    .VG_MV (VG_MV),
    .VO_MV (VO_MV)
  ) u_cbc (
    .clk100   (clk100),
    .reset    (reset),
    .ic       (ic),
    .ic_zero  (ic_zero),
    .pos_step (pos_step),
    .neg_step (neg_step),
    .pwm_pos  (pwm_pos),
    .pwm_neg  (pwm_neg),
    .active   (cbc_active)
  );

  pwm_logic u_logic (
    .pwm_out  (pwm_out),
    .pwm_pos  (pwm_pos),
    .pwm_neg  (pwm_neg),
    .pos_step (pos_step),
    .neg_step (neg_step),
    .pwm      (pwm)
  );
endmodule
