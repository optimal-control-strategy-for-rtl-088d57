// End-to-end test of the controller in closed loop with a buck power stage.
//
// The controller (all parameters at their defaults) regulates a model of
// the 5 V -> 1.5 V, 250 kHz, 1.5 uH / 290 uF converter. Beside it, a second
// converter model is regulated by the PID compensator and DPWM alone (the
// plain voltage-mode loop); both see the same load current. Two single
// steps (0 -> 5 A, 5 -> 0 A) and four successive load-step patterns are
// applied:
//   positive, second step during the drive phase   0 -> 5 -> 10 A (+3.6 us)
//   negative, second step during the drive phase  10 -> 5 ->  0 A (+8 us)
//   positive, second step during the return phase  0 -> 5 -> 10 A (+5.5 us)
//   negative, second step during the return phase 10 -> 5 ->  0 A (+12 us)
// For each, the test checks that the charge-balance controller gives a
// smaller voltage deviation than the plain loop and settles within 40 us,
// and (except for the single negative step, where the plain loop also sits
// at 0 % duty) that it settles faster than the plain loop; that the output
// ends in regulation; and that at every hand-back to the PID loop the
// inductor current is within 1.5 A of the load current. A one-period
// full-scale reading of the voltage sensor then drives the PID into its
// limit, after which the loop must recover. The test counts the mechanisms
// of the controller (step detection both ways, zero crossing, balance
// reached, return to PID, successive step in each phase, PID saturation)
// and fails for any that never happened.
`timescale 1ns / 1ps
module tb_cbc_top;
  import cbc_pkg::*;

  localparam real VREF   = 1.5;
  localparam real BAND   = 0.010;   // settled when within +-10 mV
  localparam real WIN_NS = 250000.0;

  int checks = 0, failures = 0;

  logic inclk0 = 1'b0;
  logic clk200, clk100, clk20;
  logic reset = 1'b1;
  logic initialize = 1'b0;
  real  io_load = 0.0;

  always #10 inclk0 = ~inclk0;

  pll1 u_pll (.inclk0(inclk0), .pllena(1'b1), .c0(clk200), .c1(clk100), .c2(clk20));

  // controller under test and its converter
  logic       pwm_a, overflow_a, valid_a, active_a;
  real        vc_a, il_a;
  logic [9:0] vo_a, io_a, il_code_a;
  logic       glitch = 1'b0;     // voltage sensor disturbance

  buck_model plant_a (.clk(clk200), .clk_adc(clk20), .sw(pwm_a), .io(io_load),
                      .vc(vc_a), .il(il_a), .vo_code(vo_a), .io_code(io_a),
                      .il_code(il_code_a));

  cbc_top dut (
    .clk200(clk200), .clk100(clk100), .clk20(clk20),
    .reset(reset), .initialize(initialize),
    .vo(glitch ? 10'd1023 : vo_a), .io(io_a), .il(il_code_a),
    .pwm(pwm_a), .overflow(overflow_a), .dpw_valid(valid_a), .cbc_active(active_a)
  );

  // plain voltage-mode loop for comparison
  logic              pwm_b, overflow_b, valid_b, load_b;
  logic [DUTY_W-1:0] duty_b;
  real               vc_b, il_b;
  logic [9:0]        vo_b, io_b, il_code_b;

  buck_model plant_b (.clk(clk200), .clk_adc(clk20), .sw(pwm_b), .io(io_load),
                      .vc(vc_b), .il(il_b), .vo_code(vo_b), .io_code(io_b),
                      .il_code(il_code_b));

  compensator u_pid_b (.clk100(clk100), .reset(reset), .initialize(initialize),
                       .hold(1'b0), .data_in(vo_b), .load(load_b), .duty(duty_b),
                       .dpw_valid(valid_b), .overflow(overflow_b));

  dpwm u_dpwm_b (.clk200(clk200), .clk100(clk100), .reset(reset), .data_in(duty_b),
                 .valid(valid_b), .load(load_b), .pwm_out(pwm_b));

  // ---------------- mechanism counters ----------------
  int n_pos_step = 0, n_neg_step = 0, n_zero = 0, n_balance = 0, n_vmc = 0;
  int n_succ_drive = 0, n_succ_recover = 0, n_overflow = 0;
  cbc_state_e st_q = ST_VMC;
  real worst_handback = 0.0;
  int  handback_bad = 0;

  always @(posedge clk100) begin
    if (!reset) begin
      if (dut.u_cbc.pos_ev || dut.u_cbc.neg_ev) begin
        if (dut.u_cbc.state == ST_DRIVE && dut.u_cbc.dir == (dut.u_cbc.pos_ev ? DIR_POS : DIR_NEG))
          n_succ_drive++;
        if (dut.u_cbc.state == ST_RECOVER && dut.u_cbc.dir == (dut.u_cbc.pos_ev ? DIR_POS : DIR_NEG))
          n_succ_recover++;
      end
      if (dut.u_cbc.zero_ev && dut.u_cbc.state == ST_DRIVE) n_zero++;
      if (st_q == ST_DRIVE && dut.u_cbc.state == ST_RECOVER) n_balance++;
      if (st_q == ST_RECOVER && dut.u_cbc.state == ST_VMC) begin
        real err;
        n_vmc++;
        err = il_a - io_load;
        if (err < 0.0) err = -err;
        if (err > worst_handback) worst_handback = err;
        // inductor current should meet the load within ~1.5 A (ripple 2.8 A p-p)
        if (err > 1.5) handback_bad++;
      end
      st_q <= dut.u_cbc.state;
      if (overflow_a) n_overflow++;
    end
  end
  always @(posedge clk20) begin
    if (!reset && dut.u_load_step.pos_step) n_pos_step++;
    if (!reset && dut.u_load_step.neg_step) n_neg_step++;
  end

  // ---------------- transient measurement ----------------
  real dev_a, dev_b, last_out_a, last_out_b, t_step;
  bit  measuring = 0;

  always @(posedge clk200) begin
    if (measuring) begin
      real da, db;
      da = vc_a - VREF; if (da < 0.0) da = -da;
      db = vc_b - VREF; if (db < 0.0) db = -db;
      if (da > dev_a) dev_a = da;
      if (db > dev_b) dev_b = db;
      if (da > BAND) last_out_a = $realtime;
      if (db > BAND) last_out_b = $realtime;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic transient(input string name, input real i1, input real i2, input time gap_ns,
                          input bit cmp_settling = 1'b1);
    real ts_a, ts_b;
    dev_a = 0.0; dev_b = 0.0;
    t_step = $realtime;
    last_out_a = t_step; last_out_b = t_step;
    measuring = 1;
    io_load = i1;
    #(gap_ns);
    io_load = i2;
    #(WIN_NS - real'(gap_ns));
    measuring = 0;
    ts_a = (last_out_a - t_step) / 1000.0;
    ts_b = (last_out_b - t_step) / 1000.0;
    $display("%s: deviation CBC %0.1f mV, PID %0.1f mV; settling CBC %0.1f us, PID %0.1f us",
             name, dev_a * 1000.0, dev_b * 1000.0, ts_a, ts_b);
    check(dev_a < dev_b, {name, ": CBC deviation not below PID deviation"});
    check(dev_a < 0.100, {name, ": CBC deviation above 100 mV"});
    if (cmp_settling) check(ts_a < ts_b, {name, ": CBC settling not faster than PID"});
    check(ts_a < 40.0, {name, ": CBC settling above 40 us"});
    check(!active_a, {name, ": charge-balance transient still running"});
    check((vc_a - VREF < BAND) && (VREF - vc_a < BAND), {name, ": output not back in regulation"});
  endtask

  initial begin
    #200;
    @(posedge clk20);
    reset = 1'b0;
    #100000;                       // let both loops settle at 0 A
    check(!active_a, "controller active before any load step");
    transient("pos single ", 5.0, 5.0, 1000);
    // single negative step: the PID alone also sits at 0 % duty for most of
    // it, so only the deviation is compared
    transient("neg single ", 0.0, 0.0, 1000, 1'b0);
    transient("pos case I ", 5.0, 10.0, 3600);
    transient("neg case I ", 5.0, 0.0, 8000);
    transient("pos case II", 5.0, 10.0, 5500);
    transient("neg case II", 5.0, 0.0, 12000);

    // one switching period of a full-scale voltage-sensor reading: the PID
    // result clips at 0 % (overflow) and the loop must recover on its own
    glitch = 1'b1;
    #4000;
    glitch = 1'b0;
    #250000;
    check(n_overflow > 0, "PID saturation never happened");
    check(!active_a, "sensor disturbance started a charge-balance transient");
    check((vc_a - VREF < BAND) && (VREF - vc_a < BAND), "output not back in regulation after PID saturation");

    $display("mechanisms: pos_step=%0d neg_step=%0d zero_cross=%0d balance=%0d back_to_pid=%0d succ_in_drive=%0d succ_in_return=%0d pid_saturated=%0d",
             n_pos_step, n_neg_step, n_zero, n_balance, n_vmc, n_succ_drive, n_succ_recover, n_overflow);
    $display("worst |iL - io| at hand-back: %0.2f A", worst_handback);
    check(n_pos_step == 5, "positive step count");
    check(n_neg_step == 5, "negative step count");
    check(n_zero > 0, "zero crossing never seen");
    check(n_balance > 0, "charge balance never reached");
    check(n_vmc == 6, "hand-back to PID count");
    check(n_succ_drive > 0, "successive step during drive never happened");
    check(n_succ_recover > 0, "successive step during return never happened");
    check(handback_bad == 0, "inductor current far from load current at hand-back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
