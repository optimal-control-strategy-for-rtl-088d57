// Behavioural model of the synchronous buck power stage and its sensing.
//
// Ideal switches, inductor L and capacitor C without ESR/ESL, integrated
// with forward Euler on every rising edge of clk (5 ns steps at 200 MHz):
//     diL/dt = (sw * Vg - vc) / L        dvc/dt = (iL - io) / C
// The load is an ideal current sink io (set by the testbench). The three
// converters are modelled on clk_adc: the voltage-error code is
// 512 + (vc - VREF) / 0.25 mV, the current codes are 256 + i / 25 mA, all
// rounded and clipped to 10 bits. Default component values are the
// published prototype: Vg = 5 V, Vo = 1.5 V, L = 1.5 uH, C = 290 uF.
`timescale 1ns / 1ps
module buck_model #(
  parameter real VG   = 5.0,
  parameter real VREF = 1.5,
  parameter real V_INIT = 1.5,   // output voltage at time 0
  parameter real I_INIT = -1.4,  // inductor current at time 0
  parameter real L    = 1.5e-6,
  parameter real C    = 290.0e-6,
  parameter real DT   = 5.0e-9,
  parameter real V_LSB = 0.25e-3,
  parameter real I_LSB = 0.025,
  parameter int  I_OFS = 256
) (
  input  logic       clk,        // integration step clock
  input  logic       clk_adc,    // converter sampling clock
  input  logic       sw,         // 1 = high-side switch on
  input  real        io,         // load current, A
  output real        vc,         // output voltage, V
  output real        il,         // inductor current, A
  output logic [9:0] vo_code,
  output logic [9:0] io_code,
  output logic [9:0] il_code
);
  function automatic logic [9:0] quant(input real x);
    int q;
    q = $rtoi(x + ((x >= 0.0) ? 0.5 : -0.5));
    if (q < 0)    q = 0;
    if (q > 1023) q = 1023;
    return q[9:0];
  endfunction

  initial begin
    vc = V_INIT;
    il = I_INIT;
  end

  always @(posedge clk) begin
    real vsw;
    vsw = sw ? VG : 0.0;
    il  <= il + (vsw - vc) * DT / L;
    vc  <= vc + (il - io) * DT / C;
  end

  always @(posedge clk_adc) begin
    vo_code <= quant(512.0 + (vc - VREF) / V_LSB);
    io_code <= quant(real'(I_OFS) + io / I_LSB);
    il_code <= quant(real'(I_OFS) + il / I_LSB);
  end

  initial begin
    vo_code = 10'd512;
    io_code = 10'(I_OFS);
    il_code = 10'(I_OFS);
  end
endmodule
