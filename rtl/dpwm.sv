// Counter-based digital pulse-width modulator.
//
// A free-running counter on the 200 MHz clock counts 0 .. PERIOD-1, so one
// switching period is PERIOD counts (800 counts = 4 us = 250 kHz, the
// published switching frequency). The output is high while the count is
// below the active duty value (trailing-edge modulation), giving a duty
// resolution of 5 ns (1/800).
//
// Interface and timing: data_in is the duty ratio as a 14-bit fraction of
// the period (2^14 = 100 %); it is scaled to counts, round(data_in * PERIOD
// / 2^14), and becomes the active duty on every clk200 edge where `valid` is
// high. The compensator answers a `load` pulse within a few clk100 cycles,
// so the update lands at the start of the same period (count < 8) and the
// control delay is a small part of a period; a value already passed by the
// count ends the pulse at once. `load` is a one-cycle pulse in the
// clk100 domain at the start of every period; it tells the PID compensator
// to take a new sample. The 200/100 MHz clocks are assumed to come from one
// PLL with coinciding rising edges.
`timescale 1ns / 1ps
module dpwm #(
  parameter int unsigned DUTY_W = cbc_pkg::DUTY_W,
  parameter int unsigned PERIOD = 800,   // 200 MHz / 250 kHz
  parameter int unsigned D_INIT = 240    // duty in counts used after reset
) (
  input  logic              clk200,
  input  logic              clk100,
  input  logic              reset,
  input  logic [DUTY_W-1:0] data_in,
  input  logic              valid,
  output logic              load,
  output logic              pwm_out
);
  localparam int unsigned CNT_W = $clog2(PERIOD);
  localparam int unsigned PROD_W = DUTY_W + CNT_W + 1;

  logic [PROD_W-1:0]        prod;     // data_in * PERIOD + 1/2, Q14
  logic [PROD_W-DUTY_W-1:0] scaled;   // data_in in counts, rounded
  assign prod   = PROD_W'(data_in) * PROD_W'(PERIOD) + PROD_W'(1 << (DUTY_W - 1));
  assign scaled = prod[PROD_W-1:DUTY_W];

  logic [CNT_W-1:0]  cnt;
  logic [CNT_W-1:0]  cnt_next;
  logic [DUTY_W-1:0] active;
  logic [DUTY_W-1:0] active_next;
  logic              wrap;

  always_comb begin
    wrap        = (cnt == CNT_W'(PERIOD - 1));
    cnt_next    = wrap ? '0 : cnt + 1'b1;
    active_next = valid ? DUTY_W'(scaled) : active;
  end

  always_ff @(posedge clk200 or posedge reset) begin
    if (reset) begin
      cnt     <= CNT_W'(PERIOD - 1);
      active  <= DUTY_W'(D_INIT);
      pwm_out <= 1'b0;
    end else begin
      cnt     <= cnt_next;
      active  <= active_next;
      // registered compare: output reflects the count it is entering
      pwm_out <= (DUTY_W'(cnt_next) < active_next);
    end
  end

  // counts 0 and 1 span exactly one clk100 rising edge
  always_ff @(posedge clk100 or posedge reset) begin
    if (reset) load <= 1'b0;
    else       load <= (cnt < CNT_W'(2));
  end
endmodule
