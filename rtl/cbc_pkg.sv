// Shared types and constants of the buck-converter controller.
//
// The controller regulates a synchronous buck converter with a voltage-mode
// PID loop and, on a large load-current step, hands the switch over to a
// charge-balance controller (CBC) that drives the inductor current at its
// maximum slew rate and picks the switch-back instant so that the output
// capacitor charge sums to zero over the transient.
//
// Converter numbers (Vin = 5 V, Vo = 1.5 V, fs = 250 kHz) are the published
// operating point. The current/voltage ADC widths (10 bit) and the capacitor
// current width (11 bit) follow the controller block diagram. Everything
// marked "chosen" below is this design's own choice.
`timescale 1ns / 1ps
package cbc_pkg;

  // ADC and datapath widths (block diagram).
  localparam int unsigned ADC_W  = 10;   // vo/io/il converter codes
  localparam int unsigned IC_W   = 11;   // capacitor current il - io, signed
  localparam int unsigned DUTY_W = 14;   // PID output / DPWM input

  // Converter operating point in millivolts (published values).
  localparam int unsigned VG_MV_DEF = 5000;
  localparam int unsigned VO_MV_DEF = 1500;

  // Fraction bits used for the slope ratios m1/m2 and m2/m1 (chosen).
  localparam int unsigned RATIO_FRAC = 10;

  // Direction of a load-current step.
  typedef enum logic {
    DIR_POS = 1'b0,   // load current increased: duty forced to 100 %
    DIR_NEG = 1'b1    // load current decreased: duty forced to 0 %
  } step_dir_e;

  // Phases of a charge-balance transient.
  typedef enum logic [1:0] {
    ST_VMC     = 2'd0,   // steady state, PID/DPWM own the switch
    ST_DRIVE   = 2'd1,   // t0 .. t2: inductor current slewed towards the load
    ST_RECOVER = 2'd2    // t2 .. t3: opposite slew for T3 = ratio * T2
  } cbc_state_e;

  // Ratio of the two inductor slopes in Q(RATIO_FRAC):
  //   positive step: T3 = (m1/m2) T2 = (Vg - Vo)/Vo * T2
  //   negative step: T3 = (m2/m1) T2 = Vo/(Vg - Vo) * T2
  function automatic int unsigned slope_ratio_q(input int unsigned vg_mv,
                                                input int unsigned vo_mv,
                                                input step_dir_e   dir);
    int unsigned num, den;
    if (dir == DIR_POS) begin
      num = vg_mv - vo_mv;
      den = vo_mv;
    end else begin
      num = vo_mv;
      den = vg_mv - vo_mv;
    end
    return ((num << RATIO_FRAC) + den / 2) / den;
  endfunction

endpackage
