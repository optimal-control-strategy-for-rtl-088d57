// Self-checking test of the incremental PID compensator.
//
// A reference model computes d(k) = d(k-1) + A e(k) + B e(k-1) + C e(k-2)
// with the published coefficients rounded to 1/256 and clips it to
// 0 .. 16383. Random voltage-error codes (small, large and saturating) are
// applied once per simulated switching period; the test checks the duty
// value, the overflow flag, that dpw_valid comes exactly two clocks after the
// load edge, that `hold` freezes the state and that `initialize` restores
// the nominal duty.
`timescale 1ns / 1ps
module tb_compensator;
  int checks = 0, failures = 0;

  logic        clk100 = 1'b0;
  logic        reset = 1'b1, initialize = 1'b0, hold = 1'b0, load = 1'b0;
  logic [9:0]  data_in = 10'd512;
  logic [13:0] duty;
  logic        dpw_valid, overflow;

  always #5 clk100 = ~clk100;

  compensator dut (.clk100, .reset, .initialize, .hold, .data_in, .load,
                   .duty, .dpw_valid, .overflow);

  // reference state
  longint ref_d;           // Q8
  longint re0, re1, re2;
  localparam longint KA = longint'($rtoi(27.8 * 256.0 + 0.5));
  localparam longint KB = -longint'($rtoi(49.54 * 256.0 + 0.5));
  localparam longint KC = longint'($rtoi(22.1 * 256.0 + 0.5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic ref_reset();
    ref_d = 4915 * 256; re0 = 0; re1 = 0; re2 = 0;
  endtask

  // one sample: pulse load, wait for the result, compare
  task automatic sample(input logic [9:0] code, input bit held);
    longint sum, clipped;
    bit     ovf;
    int     lat;
    data_in = code;
    @(negedge clk100) load = 1'b1;
    @(negedge clk100) load = 1'b0;
    if (!held) begin
      re2 = re1; re1 = re0; re0 = 512 - longint'(code);
      sum = ref_d + KA * re0 + KB * re1 + KC * re2;
      clipped = sum < 0 ? 0 : (sum > 16383 * 256 ? 16383 * 256 : sum);
      ovf = (clipped != sum);
      ref_d = clipped;
    end
    // load was high at one rising edge; the result is due one edge later
    lat = 1;
    while (!dpw_valid && lat < 6) begin @(posedge clk100); #1; lat++; end
    if (held) begin
      check(!dpw_valid, "result produced while on hold");
    end else begin
      check(lat == 2, $sformatf("latency %0d clocks, expected 2", lat));
      check(duty == 14'(ref_d >>> 8), $sformatf("duty %0d expected %0d", duty, ref_d >>> 8));
      check(overflow == ovf, $sformatf("overflow %0d expected %0d", overflow, ovf));
    end
    repeat (8) @(posedge clk100);
  endtask

  initial begin
    int n_ovf = 0;
    ref_reset();
    repeat (3) @(posedge clk100);
    reset = 1'b0;
    check(duty == 14'd4915, "duty after reset");
    // small errors around the set point
    for (int i = 0; i < 200; i++) sample(10'(512 + $signed($urandom_range(0, 40)) - 20), 0);
    // large errors: drive into both limits
    for (int i = 0; i < 100; i++) begin
      sample(10'($urandom_range(0, 1023)), 0);
      if (overflow) n_ovf++;
    end
    check(n_ovf > 0, "saturation never reached");
    // hold: samples ignored, state kept
    hold = 1'b1;
    for (int i = 0; i < 5; i++) sample(10'($urandom_range(0, 1023)), 1);
    hold = 1'b0;
    for (int i = 0; i < 20; i++) sample(10'(512 + $signed($urandom_range(0, 20)) - 10), 0);
    // initialize
    @(negedge clk100) initialize = 1'b1;
    @(negedge clk100) initialize = 1'b0;
    ref_reset();
    check(duty == 14'd4915 && !overflow, "initialize restores nominal duty");
    for (int i = 0; i < 20; i++) sample(10'(512 + $signed($urandom_range(0, 20)) - 10), 0);
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
