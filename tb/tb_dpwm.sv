// Self-checking test of the digital PWM.
//
// Clocks come from the PLL model (200 and 100 MHz, aligned edges). Like the
// compensator, the test answers every `load` pulse with a new 14-bit duty
// two clk100 cycles later and then counts the clk200 cycles in which pwm_out
// is high until the next `load`. Each count must equal
// round(duty * 800 / 16384) (800 for values at or above full scale), and
// `load` must repeat every 400 clk100 cycles (250 kHz).
`timescale 1ns / 1ps
module tb_dpwm;
  int checks = 0, failures = 0;

  logic inclk0 = 1'b0;
  logic clk200, clk100, clk20;
  logic reset = 1'b1, valid = 1'b0, load, pwm_out;
  logic [13:0] data_in = '0;

  always #10 inclk0 = ~inclk0;
  pll1 u_pll (.inclk0, .pllena(1'b1), .c0(clk200), .c1(clk100), .c2(clk20));

  dpwm dut (.clk200, .clk100, .reset, .data_in, .valid, .load, .pwm_out);

  int high_cnt = 0;
  always @(posedge clk200) if (!reset && pwm_out) high_cnt++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int expected, since, got, n_full = 0;
    logic [13:0] d;
    repeat (4) @(posedge clk100);
    reset = 1'b0;
    // first load pulse: start of the first full period
    do @(posedge clk100); while (!load);
    high_cnt = 0;
    for (int k = 0; k < 300; k++) begin
      case (k % 10)
        0:       d = 14'd16383;                              // 100 %
        1:       d = 14'd16000;
        default: d = 14'($urandom_range(300, 16300));
      endcase
      @(negedge clk100);
      @(negedge clk100) begin valid = 1'b1; data_in = d; end
      @(negedge clk100) valid = 1'b0;
      since = 2;
      do begin @(posedge clk100); since++; end while (!load);
      got = high_cnt;
      high_cnt = 0;
      expected = (int'(d) * 800 + 8192) / 16384;
      if (expected > 800) expected = 800;
      if (expected == 800) n_full++;
      check(got == expected, $sformatf("period %0d: %0d high cycles, expected %0d", k, got, expected));
      check(since == 400, $sformatf("load period %0d clk100 cycles, expected 400", since));
    end
    check(n_full > 0, "full duty never tested");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
