// Capacitor-current computation and zero-crossing judgment.
//
// The output capacitor current is the difference of the sensed inductor and
// load currents, ic = il - io (both converters must share scale and
// offset). The block registers ic on every 20 MHz sample and raises
// `ic_zero` for one sample when ic crosses zero in the direction that ends
// the discharge (or recharge) part of a transient: from negative to zero or
// positive after a positive load step, from positive to zero or negative
// after a negative load step. That instant is t_z in the charge-balance
// equations. The direction is taken from the last pos_step/neg_step pulse
// (this design's choice; the ports follow the block diagram).
//
// Timing: ic is one clk20 cycle behind il/io; ic_zero is high in the same
// cycle as the first ic sample on the far side of zero.
`timescale 1ns / 1ps
module crosszero #(
  parameter int unsigned ADC_W = cbc_pkg::ADC_W,
  parameter int unsigned IC_W  = cbc_pkg::IC_W
) (
  input  logic                   clk20,
  input  logic                   reset,
  input  logic [ADC_W-1:0]       io,
  input  logic [ADC_W-1:0]       il,
  input  logic                   pos_step,
  input  logic                   neg_step,
  output logic signed [IC_W-1:0] ic,
  output logic                   ic_zero
);
  import cbc_pkg::*;

  step_dir_e               dir;
  step_dir_e               dir_now;   // a step pulse takes effect at once
  logic signed [IC_W-1:0]  ic_new;

  always_comb begin
    if (pos_step)      dir_now = DIR_POS;
    else if (neg_step) dir_now = DIR_NEG;
    else               dir_now = dir;
  end

  assign ic_new = $signed({1'b0, il}) - $signed({1'b0, io});

  always_ff @(posedge clk20 or posedge reset) begin
    if (reset) begin
      dir     <= DIR_POS;
      ic      <= '0;
      ic_zero <= 1'b0;
    end else begin
      dir <= dir_now;
      ic  <= ic_new;
      if (dir_now == DIR_POS) ic_zero <= (ic < 0) && (ic_new >= 0);
      else                ic_zero <= (ic > 0) && (ic_new <= 0);
    end
  end
endmodule
