// Self-checking test of the load-step detector.
//
// Drives the 10-bit load-current code with noise, slow drifts, steps below
// and above the threshold, steps smeared over up to four samples and
// successive steps. Every step larger than the threshold must give exactly
// one pulse of the right sign within the smear length plus one sample;
// nothing else may give a pulse.
`timescale 1ns / 1ps
module tb_load_step;
  int checks = 0, failures = 0;

  logic       clk20 = 1'b0;
  logic       reset = 1'b1;
  logic [9:0] io = 10'd256;
  logic       pos_step, neg_step;

  always #25 clk20 = ~clk20;

  load_step dut (.clk20, .reset, .io, .pos_step, .neg_step);

  int n_pos = 0, n_neg = 0;
  always @(posedge clk20) begin
    if (!reset && pos_step) n_pos++;
    if (!reset && neg_step) n_neg++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int level = 256;

  // hold the level with +-3 codes of noise for n samples
  task automatic quiet(input int n);
    repeat (n) @(negedge clk20) io = 10'(level + $signed($urandom_range(0, 6)) - 3);
  endtask

  // move to a new level over `smear` samples; expect `np`/`nn` pulses
  task automatic step(input int delta, input int smear, input int np, input int nn);
    int p0, n0;
    int start;
    p0 = n_pos; n0 = n_neg;
    start = level;
    for (int i = 1; i <= smear; i++)
      @(negedge clk20) io = 10'(start + delta * i / smear);
    level = start + delta;
    quiet(12);
    check(n_pos - p0 == np, $sformatf("step %0d/%0d: %0d positive pulses, expected %0d", delta, smear, n_pos - p0, np));
    check(n_neg - n0 == nn, $sformatf("step %0d/%0d: %0d negative pulses, expected %0d", delta, smear, n_neg - n0, nn));
  endtask

  initial begin
    int p0;
    repeat (3) @(negedge clk20);
    reset = 1'b0;
    quiet(20);
    check(n_pos == 0 && n_neg == 0, "pulse on a quiet input");
    // sharp steps: 5 A and 10 A at 25 mA per code
    step(200, 1, 1, 0);
    step(-200, 1, 0, 1);
    step(400, 1, 1, 0);
    step(-400, 1, 0, 1);
    // below the threshold
    step(50, 1, 0, 0);
    step(-50, 1, 0, 0);
    // smeared edges
    step(200, 3, 1, 0);
    step(-200, 4, 0, 1);
    // slow drift of 8 codes per sample over 40 samples (320 codes)
    for (int i = 0; i < 40; i++) step(8, 1, 0, 0);
    for (int i = 0; i < 40; i++) step(-8, 1, 0, 0);
    // latency: sharp step, pulse must be high in the second clock after
    p0 = n_pos;
    @(negedge clk20) io = 10'(level + 200);
    level = level + 200;
    @(negedge clk20);
    check(pos_step, "pulse not one clock after the step sample");
    quiet(12);
    check(n_pos - p0 == 1, "latency step gave more than one pulse");
    // successive steps 2.5 us (50 samples) apart
    level = 256;
    quiet(10);
    p0 = n_pos;
    step(200, 1, 1, 0);
    quiet(38);
    step(200, 1, 1, 0);
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
