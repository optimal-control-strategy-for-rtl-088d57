// Self-checking test of the charge-balance controller.
//
// The controller is closed around an idealised current loop: while it
// forces the switch on, the inductor-current code rises by M1 codes per
// 100 MHz cycle, while it forces it off it falls by M2 codes (Vin = 5 V,
// Vo = 1.5 V, L = 1.5 uH, 25 mA per code), and in voltage-mode control it
// stays where it is. The capacitor current il - io is sampled every fifth
// cycle (20 MHz) and its zero crossings are flagged as the zero-crossing
// block does. Single, successive (second step before and after the switch
// reversal) and opposite load steps are applied. For every transient the
// test checks, from the charge-balance principle alone, that
//   - the switch is forced the right way within two cycles of the step,
//   - at the hand-back the inductor current equals the load current
//     within 8 codes (0.2 A), and
//   - the capacitor charge summed from the step to the hand-back is close
//     to zero compared with the charge moved during the transient,
// and that the return phase lasts (m1/m2) or (m2/m1) times the time from
// the last zero crossing to the reversal, within a cycle.
`timescale 1ns / 1ps
module tb_cbc;
  import cbc_pkg::*;

  localparam real M1 = (5.0 - 1.5) / 1.5e-6 * 10.0e-9 / 0.025;   // codes/cycle
  localparam real M2 = 1.5 / 1.5e-6 * 10.0e-9 / 0.025;

  int checks = 0, failures = 0;

  logic clk100 = 1'b0;
  logic reset = 1'b1;
  logic signed [10:0] ic = '0;
  logic ic_zero = 1'b0, pos_step = 1'b0, neg_step = 1'b0;
  logic pwm_pos, pwm_neg, active;

  always #5 clk100 = ~clk100;

  cbc #(.ZC_LATENCY(3)) dut (.clk100, .reset, .ic, .ic_zero, .pos_step, .neg_step, .pwm_pos, .pwm_neg, .active);

  real iL = 300.0, io = 300.0;
  int  phase = 0;           // 0..4: position in the 20 MHz sample period
  bit  dir_neg = 0;         // direction of the last step for zero crossings
  real q_sum = 0.0, q_abs = 0.0;
  int  n_sample = 0;

  // current loop and converter sampling
  always @(posedge clk100) begin
    if (pwm_pos)      iL <= iL + M1;
    else if (pwm_neg) iL <= iL - M2;
    phase <= (phase + 1) % 5;
    if (phase == 4) begin
      int nic;
      nic = $rtoi(iL - io + ((iL - io >= 0.0) ? 0.5 : -0.5));
      ic_zero <= dir_neg ? (ic > 0 && nic <= 0) : (ic < 0 && nic >= 0);
      ic <= 11'(nic);
    end
    if (active) begin
      q_sum = q_sum + (iL - io);
      q_abs = q_abs + ((iL - io) >= 0.0 ? (iL - io) : (io - iL));
    end
  end

  // return-phase length check
  int t_cross = 0, t_rev = 0, t3 = 0, cyc = 0, n_rev = 0;
  bit was_drive = 0, was_rec = 0, drive_pos = 0;
  always @(posedge clk100) if (!reset) begin
    cyc++;
    if (dut.state == ST_DRIVE && dut.zero_ev) t_cross = cyc;
    if (was_drive && dut.state == ST_RECOVER) t_rev = cyc;
    if (was_rec && dut.state == ST_VMC) begin
      real ratio, expect_t3;
      ratio = drive_pos ? (3.5 / 1.5) : (1.5 / 3.5);
      expect_t3 = ratio * real'(t_rev - t_cross + 2);
      t3 = cyc - t_rev;
      checks++;
      n_rev++;
      if (real'(t3) < expect_t3 * 0.99 - 2.0 || real'(t3) > expect_t3 * 1.01 + 2.0) begin
        failures++;
        $display("FAIL: return phase %0d cycles, expected %0.1f", t3, expect_t3);
      end
    end
    was_drive = (dut.state == ST_DRIVE);
    was_rec   = (dut.state == ST_RECOVER);
    if (dut.state == ST_DRIVE) drive_pos = (dut.dir == DIR_POS);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // apply a load step; like the 20 MHz detector, the step pulse lasts five
  // cycles and starts together with the first ic sample taken after the step
  task automatic load_step(input real delta);
    @(negedge clk100);
    while (phase != 4) @(negedge clk100);
    io = io + delta;
    dir_neg = (delta < 0.0);
    @(negedge clk100);
    if (delta > 0.0) pos_step = 1'b1; else neg_step = 1'b1;
    repeat (2) @(negedge clk100);
    check(delta > 0.0 ? (pwm_pos && !pwm_neg) : (pwm_neg && !pwm_pos),
          $sformatf("switch not forced within two cycles of the step (state %0d pos %0d neg %0d)", dut.state, pwm_pos, pwm_neg));
    repeat (3) @(negedge clk100);
    pos_step = 1'b0;
    neg_step = 1'b0;
  endtask

  task automatic transient(input string name, input real d1, input real d2, input int gap,
                          input bit balance = 1'b1);
    q_sum = 0.0; q_abs = 0.0;
    load_step(d1);
    if (gap > 0) begin
      repeat (gap) @(negedge clk100);
      load_step(d2);
    end
    while (active) @(negedge clk100);
    $display("%s: |iL - io| = %0.2f codes, net charge %0.2f%% of moved charge",
             name, (iL > io) ? iL - io : io - iL, 100.0 * q_sum / q_abs);
    check((iL - io) < 8.0 && (io - iL) < 8.0, {name, ": inductor current not at load current at hand-back"});
    if (balance)
      check(q_sum < 0.08 * q_abs && -q_sum < 0.08 * q_abs, {name, ": capacitor charge not balanced"});
    iL = io;   // voltage-mode control settles the ripple
    repeat (50) @(negedge clk100);
  endtask

  initial begin
    repeat (3) @(negedge clk100);
    reset = 1'b0;
    repeat (20) @(negedge clk100);
    check(!active && !pwm_pos && !pwm_neg, "active without a step");
    transient("single +5 A      ", 200.0, 0.0, 0);
    transient("single -5 A      ", -200.0, 0.0, 0);
    transient("+5 +5 A before tz", 200.0, 200.0, 150);
    transient("+5 +5 A in drive ", 200.0, 200.0, 260);
    transient("+5 +5 A in return", 200.0, 200.0, 450);
    transient("-5 -5 A in drive ", -200.0, -200.0, 700);
    transient("-5 -5 A in return", -200.0, -200.0, 1150);
    // an opposite step starts a new transient: only its own charge balances
    transient("+5 then -3 A     ", 200.0, -120.0, 150, 1'b0);
    check(n_rev >= 8, "too few reversals");
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
