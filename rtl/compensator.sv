// Incremental digital PID compensator (voltage-mode control loop).
//
// Computes, once per switching period, the velocity-form PID law
//     d(k) = d(k-1) + A e(k) + B e(k-1) + C e(k-2)
// with the published coefficients A = 27.8, B = -49.54, C = 22.1 (30 kHz
// bandwidth, 52 deg phase margin design), held here as signed fixed-point
// numbers with COEF_FRAC fraction bits (defaults 7117, -12682, 5658 / 256).
//
// Interface: data_in is the 10-bit code of the voltage-error converter.
// The error is e = REF_CODE - data_in, so a code below mid-scale means the
// output voltage is below its reference. d is the duty ratio as a 14-bit
// fraction (2^14 = one full period, clipped to 0 .. DUTY_MAX). The units of
// e and d behind the published coefficients are not given; here one error
// LSB times a coefficient moves d by coefficient/2^14 of a period (with a
// 0.25 mV error LSB this gives a stable loop on the 5 V / 1.5 V converter).
// That scaling is this design's choice.
//
// Timing (clk100 domain): a rising edge of `load` (one pulse per switching
// period from the DPWM) samples data_in; one clock later the new duty is on
// `duty` and `dpw_valid` pulses high for one clock. `overflow` is high while
// the last result was clipped to 0 or DUTY_MAX; the clipped value is what is
// kept as d(k-1), which keeps the integral from winding up.
// `hold` (high while the charge-balance controller owns the switch) makes
// the compensator skip samples, so d(k-1) and the error history keep their
// pre-transient values and the loop resumes without wind-up; this input is
// this design's addition (the block diagram shows no link between the two).
// `initialize` (synchronous) clears the error history and presets d(k-1) to
// D_INIT, the nominal Vo/Vin duty; `reset` does the same asynchronously.
`timescale 1ns / 1ps
module compensator #(
  parameter int unsigned ADC_W     = cbc_pkg::ADC_W,
  parameter int unsigned DUTY_W    = cbc_pkg::DUTY_W,
  parameter int unsigned COEF_FRAC = 8,
  parameter int          COEF_A    = 7117,     // 27.8   * 256
  parameter int          COEF_B    = -12682,   // -49.54 * 256
  parameter int          COEF_C    = 5658,     // 22.1   * 256
  parameter int unsigned REF_CODE  = 512,      // error-ADC code for zero error
  parameter int unsigned DUTY_MAX  = 16383,    // largest duty, Q14
  parameter int unsigned D_INIT    = 4915      // 1.5 V / 5 V in Q14
) (
  input  logic              clk100,
  input  logic              reset,
  input  logic              initialize,
  input  logic              hold,
  input  logic [ADC_W-1:0]  data_in,
  input  logic              load,
  output logic [DUTY_W-1:0] duty,
  output logic              dpw_valid,
  output logic              overflow
);
  localparam int ACC_W = DUTY_W + COEF_FRAC + 12;
  localparam logic signed [ACC_W-1:0] ACC_MAX = ACC_W'(DUTY_MAX) <<< COEF_FRAC;
  localparam logic signed [ACC_W-1:0] ACC_INI = ACC_W'(D_INIT) <<< COEF_FRAC;

  logic                      load_q;
  logic                      calc;          // a new e(k) is held in e0
  logic signed [ADC_W:0]     e0, e1, e2;    // e(k), e(k-1), e(k-2)
  logic signed [ACC_W-1:0]   d_acc;         // d(k-1), Q(COEF_FRAC)
  logic signed [ACC_W-1:0]   d_next, d_sum;

  // sum of the PID terms for the sample in e0
  always_comb begin
    d_sum = d_acc
          + ACC_W'(e0 * COEF_A)
          + ACC_W'(e1 * COEF_B)
          + ACC_W'(e2 * COEF_C);
    if (d_sum < 0)            d_next = '0;
    else if (d_sum > ACC_MAX) d_next = ACC_MAX;
    else                      d_next = d_sum;
  end

  always_ff @(posedge clk100 or posedge reset) begin
    if (reset) begin
      load_q    <= 1'b0;
      calc      <= 1'b0;
      e0        <= '0;
      e1        <= '0;
      e2        <= '0;
      d_acc     <= ACC_INI;
      duty      <= DUTY_W'(D_INIT);
      dpw_valid <= 1'b0;
      overflow  <= 1'b0;
    end else if (initialize) begin
      load_q    <= 1'b0;
      calc      <= 1'b0;
      e0        <= '0;
      e1        <= '0;
      e2        <= '0;
      d_acc     <= ACC_INI;
      duty      <= DUTY_W'(D_INIT);
      dpw_valid <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      load_q    <= load;
      dpw_valid <= 1'b0;
      calc      <= 1'b0;
      if (load && !load_q && !hold) begin
        // sample: shift the error history, e(k) = reference - measurement
        e0   <= $signed({1'b0, ADC_W'(REF_CODE)}) - $signed({1'b0, data_in});
        e1   <= e0;
        e2   <= e1;
        calc <= 1'b1;
      end
      if (calc) begin
        d_acc     <= d_next;
        duty      <= DUTY_W'(d_next >>> COEF_FRAC);
        dpw_valid <= 1'b1;
        overflow  <= (d_sum != d_next);
      end
    end
  end
endmodule
