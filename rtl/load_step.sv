// Load-current step detector.
//
// Compares the change of the sampled load current io with a predefined
// threshold and flags a positive step (load current rose) or a negative step
// (load current fell). Each flag is a one-cycle pulse on the 20 MHz sample
// clock; it starts a charge-balance transient, or restarts the drive phase
// of one already running when a further step arrives (successive steps).
//
// How it works (this design's choice; only "compare the change with a
// threshold" is given): the current sample is compared with the sample taken
// WINDOW cycles earlier, so an edge smeared over up to WINDOW samples by the
// sense amplifier is still seen as one step. After a detection the detector
// holds off for WINDOW cycles, until the delayed sample has passed the edge,
// so one edge gives one pulse. Latency: the pulse follows, one clock after
// the sample in which the difference first exceeds THRESHOLD codes.
// Slow drifts below THRESHOLD per WINDOW are left to the PID loop.
`timescale 1ns / 1ps
module load_step #(
  parameter int unsigned ADC_W     = cbc_pkg::ADC_W,
  parameter int unsigned WINDOW    = 4,    // samples between compared values
  parameter int unsigned THRESHOLD = 64    // io codes (1.6 A at 25 mA/code)
) (
  input  logic             clk20,
  input  logic             reset,
  input  logic [ADC_W-1:0] io,
  output logic             pos_step,
  output logic             neg_step
);
  localparam int unsigned HOLD_W = $clog2(WINDOW + 1);

  logic [ADC_W-1:0]  hist [WINDOW];   // hist[WINDOW-1] is the oldest sample
  logic [HOLD_W-1:0] hold;
  logic signed [ADC_W+1:0] delta;

  assign delta = $signed({2'b00, io}) - $signed({2'b00, hist[WINDOW-1]});

  always_ff @(posedge clk20 or posedge reset) begin
    if (reset) begin
      for (int i = 0; i < WINDOW; i++) hist[i] <= '0;
      hold     <= HOLD_W'(WINDOW);   // history is not valid yet
      pos_step <= 1'b0;
      neg_step <= 1'b0;
    end else begin
      hist[0] <= io;
      for (int i = 1; i < WINDOW; i++) hist[i] <= hist[i-1];
      pos_step <= 1'b0;
      neg_step <= 1'b0;
      if (hold != '0) begin
        hold <= hold - 1'b1;
      end else if (delta > $signed((ADC_W+2)'(THRESHOLD))) begin
        pos_step <= 1'b1;
        hold     <= HOLD_W'(WINDOW);
      end else if (delta < -$signed((ADC_W+2)'(THRESHOLD))) begin
        neg_step <= 1'b1;
        hold     <= HOLD_W'(WINDOW);
      end
    end
  end
endmodule
