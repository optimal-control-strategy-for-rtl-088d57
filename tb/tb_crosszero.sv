// Self-checking test of the capacitor-current and zero-crossing block.
//
// The inductor-current code follows triangular ramps around the load-current
// code (as under forced 100 % / 0 % duty) and, in between, random values.
// A reference model, run on the same inputs, computes ic = il - io one
// sample late and flags the sign change that matches the direction of the
// last step pulse (negative to non-negative after a positive step, positive
// to non-positive after a negative step). Every sample is compared.
`timescale 1ns / 1ps
module tb_crosszero;
  int checks = 0, failures = 0;

  logic        clk20 = 1'b0;
  logic        reset = 1'b1;
  logic [9:0]  io = 10'd300, il = 10'd300;
  logic        pos_step = 1'b0, neg_step = 1'b0;
  logic signed [10:0] ic;
  logic        ic_zero;

  always #25 clk20 = ~clk20;

  crosszero dut (.clk20, .reset, .io, .il, .pos_step, .neg_step, .ic, .ic_zero);

  // reference model
  int  ref_ic = 0;
  bit  ref_zero = 0;
  bit  ref_neg_dir = 0;
  int  n_zero = 0, n_pos_cross = 0, n_neg_cross = 0;

  always @(posedge clk20) begin
    int nic;
    bit ndir;
    if (!reset) begin
      nic  = int'(il) - int'(io);
      ndir = pos_step ? 1'b0 : (neg_step ? 1'b1 : ref_neg_dir);
      ref_zero <= ndir ? (ref_ic > 0 && nic <= 0) : (ref_ic < 0 && nic >= 0);
      ref_ic <= nic;
      ref_neg_dir <= ndir;
    end
  end

  always @(negedge clk20) begin
    if (!reset) begin
      checks++;
      if (int'(ic) != ref_ic || ic_zero != ref_zero) begin
        failures++;
        $display("FAIL: ic=%0d ic_zero=%0d, expected %0d %0d", ic, ic_zero, ref_ic, ref_zero);
      end
      if (ic_zero) begin
        n_zero++;
        if (ref_neg_dir) n_neg_cross++; else n_pos_cross++;
      end
    end
  end

  task automatic ramp(input int from, input int to, input int stepv);
    int v = from;
    while ((stepv > 0) ? (v <= to) : (v >= to)) begin
      @(negedge clk20) il = 10'(v);
      v += stepv;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk20);
    reset = 1'b0;
    for (int k = 0; k < 20; k++) begin
      // positive step: io jumps up, il ramps up through it and back down
      @(negedge clk20) begin io = 10'(300 + k); pos_step = 1'b1; end
      @(negedge clk20) pos_step = 1'b0;
      ramp(100, 600, 7);
      ramp(600, 100, -3);
      // negative step
      @(negedge clk20) begin io = 10'(200 - k); neg_step = 1'b1; end
      @(negedge clk20) neg_step = 1'b0;
      ramp(600, 50, -3);
      ramp(50, 400, 7);
      // random values
      repeat (50) @(negedge clk20) begin il = 10'($urandom); io = 10'($urandom); end
    end
    // hitting zero exactly
    @(negedge clk20) begin io = 10'd300; il = 10'd290; pos_step = 1'b1; end
    @(negedge clk20) begin pos_step = 1'b0; il = 10'd300; end
    @(negedge clk20);
    @(negedge clk20);
    checks++;
    if (n_pos_cross < 20 || n_neg_cross < 20) begin
      failures++;
      $display("FAIL: too few crossings %0d %0d", n_pos_cross, n_neg_cross);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
