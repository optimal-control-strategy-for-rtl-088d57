// Charge-balance controller (CBC) for load-current transients.
//
// On a load step the capacitor must supply the difference between load and
// inductor current. The CBC forces the switch fully on (positive step) or
// fully off (negative step) so the inductor current slews at its maximum
// rate, integrates the capacitor current ic from the step instant t0, and
// switches the other way at the instant t2 at which the charge still to come
// while the inductor current returns to the load current exactly cancels
// the charge already taken. After the return phase T3 the voltage-mode PID
// loop takes over again.
//
// Let Qa be the integral of ic from t0 to the last zero crossing t_z of ic
// (flagged by the zero-crossing block) and Qb the integral from t_z on.
// t2 is reached when
//     positive step:  Vo * Qa + Vg * Qb >= 0
//     negative step:  (Vg - Vo) * Qa + Vg * Qb <= 0
// and the return phase then lasts T3 = (m1/m2) * T2 (positive) or
// (m2/m1) * T2 (negative), with T2 = t2 - t_z, m1 = (Vg-Vo)/L and
// m2 = Vo/L. A further step in the same direction while a transient runs
// (successive load change) forces the drive phase again without clearing
// the integral, so t_z becomes the last crossing and the balance covers the
// whole transient from t0. These rules are the published algorithm.
//
// The crossing is seen some time after it happens: ic is sampled at 20 MHz
// and passes a converter and two registers. ZC_LATENCY is that delay in
// clk100 cycles (8 for the controller's pipeline: half a sample period on
// average, plus the converter sample and the zero-crossing register, plus
// the edge detection here); the T2 counter starts from it, so the return
// phase is not cut short by m1/m2 times the detection delay.
//
// This design's choices: the integral and the T2/T3 counters run on the
// 100 MHz clock with ic held between 20 MHz samples (a constant scale factor
// on both sides of the balance test); a step in the opposite direction
// during a transient starts a new transient from zero charge; if a further
// step finds ic already past zero (no new crossing will come), the old
// crossing and T2 count are kept.
//
// Interface: step pulses and ic_zero come from the 20 MHz domain and are
// edge-detected here. A step pulse must arrive with (not before) the first
// ic sample that contains the step, as the load-step and zero-crossing
// blocks provide, because the sign of ic decides how a successive step is
// handled. pwm_pos = force switch on, pwm_neg = force switch off;
// both low means the PID/DPWM path drives the switch. `active` is high for
// the whole transient. Outputs react one clk100 cycle after the detected
// edge.
`timescale 1ns / 1ps
module cbc #(
  parameter int unsigned IC_W  = cbc_pkg::IC_W,
  parameter int unsigned Q_W   = 32,                   // charge integrators
  parameter int unsigned CNT_W = 16,                   // T2/T3 counters
  parameter int unsigned VG_MV = cbc_pkg::VG_MV_DEF,   // input voltage
  parameter int unsigned VO_MV = cbc_pkg::VO_MV_DEF,   // output voltage
  parameter int unsigned ZC_LATENCY = 8                // see below
) (
  input  logic                  clk100,
  input  logic                  reset,
  input  logic signed [IC_W-1:0] ic,
  input  logic                  ic_zero,
  input  logic                  pos_step,
  input  logic                  neg_step,
  output logic                  pwm_pos,
  output logic                  pwm_neg,
  output logic                  active
);
  import cbc_pkg::*;

  localparam int unsigned W_W  = 16;              // width of the weights
  localparam int unsigned P_W  = Q_W + W_W + 1;   // weighted charge
  localparam int unsigned R_POS = slope_ratio_q(VG_MV, VO_MV, DIR_POS);
  localparam int unsigned R_NEG = slope_ratio_q(VG_MV, VO_MV, DIR_NEG);

  cbc_state_e              state;
  step_dir_e               dir;
  logic                    pos_q, neg_q, zero_q;
  logic                    pos_ev, neg_ev, zero_ev;
  logic signed [Q_W-1:0]   q_tot;      // integral of ic since t0
  logic signed [Q_W-1:0]   q_a;        // integral of ic from t0 to t_z
  logic                    crossed;    // t_z seen since the last step
  logic [CNT_W-1:0]        t2_cnt;     // clk100 cycles since t_z
  logic [CNT_W-1:0]        t3_cnt;
  logic [CNT_W-1:0]        t3_len;
  logic signed [P_W-1:0]   balance;
  logic                    balanced;
  logic                    ic_past;    // ic already on the far side of zero
  logic [CNT_W+RATIO_FRAC+W_W-1:0] t3_prod;

  assign pos_ev  = pos_step && !pos_q;
  assign neg_ev  = neg_step && !neg_q;
  assign zero_ev = ic_zero && !zero_q;

  // balance test of Eq. (8)/(16) (positive) or (11)/(18) (negative)
  always_comb begin
    logic signed [P_W-1:0] wa, wb;
    wa = (dir == DIR_POS) ? P_W'(VO_MV) : P_W'(VG_MV - VO_MV);
    wb = P_W'(VG_MV);
    balance  = wa * P_W'(q_a) + wb * (P_W'(q_tot) - P_W'(q_a));
    balanced = (dir == DIR_POS) ? (balance >= 0) : (balance <= 0);
    ic_past  = (dir == DIR_POS) ? (ic >= 0) : (ic <= 0);
    t3_prod  = (CNT_W+RATIO_FRAC+W_W)'(t2_cnt)
             * (CNT_W+RATIO_FRAC+W_W)'((dir == DIR_POS) ? R_POS : R_NEG);
  end

  always_ff @(posedge clk100 or posedge reset) begin
    if (reset) begin
      pos_q   <= 1'b0;
      neg_q   <= 1'b0;
      zero_q  <= 1'b0;
      state   <= ST_VMC;
      dir     <= DIR_POS;
      q_tot   <= '0;
      q_a     <= '0;
      crossed <= 1'b0;
      t2_cnt  <= '0;
      t3_cnt  <= '0;
      t3_len  <= '0;
    end else begin
      pos_q  <= pos_step;
      neg_q  <= neg_step;
      zero_q <= ic_zero;

      if (pos_ev || neg_ev) begin
        if (state == ST_VMC || dir != (pos_ev ? DIR_POS : DIR_NEG)) begin
          // t0 of a new transient
          state   <= ST_DRIVE;
          dir     <= pos_ev ? DIR_POS : DIR_NEG;
          q_tot   <= '0;
          q_a     <= '0;
          crossed <= 1'b0;
          t2_cnt  <= '0;
        end else begin
          // successive step in the same direction: drive again
          state  <= ST_DRIVE;
          q_tot  <= q_tot + Q_W'(ic);
          if (!ic_past) begin
            crossed <= 1'b0;
            t2_cnt  <= '0;
          end
        end
      end else begin
        case (state)
          ST_VMC: ;
          ST_DRIVE: begin
            q_tot <= q_tot + Q_W'(ic);
            if (zero_ev) begin
              // t_z: the discharge part ends here
              q_a     <= q_tot;
              crossed <= 1'b1;
              t2_cnt  <= CNT_W'(ZC_LATENCY);
            end else if (crossed && balanced) begin
              // t2: charge balance reached, reverse the slew
              state  <= ST_RECOVER;
              t3_len <= CNT_W'(t3_prod >> RATIO_FRAC);
              t3_cnt <= '0;
            end else if (crossed && t2_cnt != '1) begin
              t2_cnt <= t2_cnt + 1'b1;
            end
          end
          ST_RECOVER: begin
            q_tot  <= q_tot + Q_W'(ic);
            t3_cnt <= t3_cnt + 1'b1;
            if (t3_cnt + 1'b1 >= t3_len) state <= ST_VMC;   // t3
          end
          default: state <= ST_VMC;
        endcase
      end
    end
  end

  always_comb begin
    active  = (state != ST_VMC);
    pwm_pos = ((state == ST_DRIVE)   && (dir == DIR_POS)) ||
              ((state == ST_RECOVER) && (dir == DIR_NEG));
    pwm_neg = ((state == ST_DRIVE)   && (dir == DIR_NEG)) ||
              ((state == ST_RECOVER) && (dir == DIR_POS));
  end
endmodule
