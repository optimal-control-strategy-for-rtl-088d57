// Behavioural model of the clock PLL used by the testbenches. The controller
// takes its three clocks from the FPGA's PLL primitive; this model stands in
// for it in simulation.
//
// Function: from a 50 MHz reference on inclk0 it produces three clocks with
// 0 degree phase and 50 % duty cycle, as listed in the controller's clock
// table: c0 = 4/1 x 50 MHz = 200 MHz (DPWM counter), c1 = 2/1 x 50 MHz =
// 100 MHz (PID, charge-balance controller), c2 = 2/5 x 50 MHz = 20 MHz
// (ADC sampling, load-step and zero-crossing detection).
//
// How it works: after pllena is high and the first rising edge of inclk0 has
// arrived, one process steps a 2.5 ns tick and derives all three clocks from
// a single tick counter, so their rising edges coincide exactly (every c2
// rising edge is also a c1 and c0 rising edge). The model does not track the
// reference frequency; it assumes inclk0 is the nominal 50 MHz. The lock
// behaviour of a real PLL is not modelled (the clocks start at once).
`timescale 1ns / 1ps
module pll1 (
  input  logic inclk0,   // 50 MHz reference
  input  logic pllena,   // PLL enable (tied high in the controller)
  output logic c0,       // 200 MHz
  output logic c1,       // 100 MHz
  output logic c2        // 20 MHz
);
  int unsigned tick;   // 2.5 ns ticks since start, wraps every 50 ns

  initial begin
    c0   = 1'b0;
    c1   = 1'b0;
    c2   = 1'b0;
    tick = 0;
    do @(posedge inclk0); while (!pllena);
    forever begin
      // all three clocks change in the same statement group
      c0   = (tick % 2)  == 0;
      c1   = (tick % 4)  < 2;
      c2   = (tick % 20) < 10;
      #2.5;
      tick = (tick + 1) % 20;
    end
  end
endmodule
