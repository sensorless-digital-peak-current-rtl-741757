`timescale 1ps/1ps
// Sensorless digital peak-current-mode controller for a buck converter.
// No current sensor: the inductor current is reconstructed by a pulse that
// travels along a bi-directional delay line, up while the high-side switch
// is on (speed proportional to m1 = (V_g - v_out)/L) and down while it is
// off (speed proportional to |m2| = v_out/L). The digital comparator built
// from the line's multiplexer ends the on-time when the observed current
// reaches the command i_c[n] from the voltage-loop compensator.
// Each switching period starts on the rising edge of clk_fs; its high phase
// is the set pulse of the PWM latch (it must last longer than one delay
// cell). e[n] is sampled on the same edge and i_c[n] changes one period
// later. The start-up sequence (soft start, voltage mode, calibration of the
// return slope, current mode) runs in calib_ctrl. The analog inputs vg_mv and
// vout_mv (millivolt codes) feed the delay control model. While rst_n is low the switches are
// off and the pulse is held at the injection point.
// The loop from Q through the observer's reset back into the PWM latch is
// intended: it is the asynchronous current loop, and lint tools report it
// as a combinational loop. The latch bits are the S-R latches of the line
// and of the modulator.
// The block structure follows the design; the compensator law, the start-up
// details and the injection point INJ are this design's own choices.
module scm_controller
  import scm_pkg::*;
#(
  parameter int unsigned NBITS   = N_BITS,
  parameter int unsigned JBITS   = J_BITS,
  parameter int unsigned EBITS   = 8,
  parameter int unsigned INJ     = 48,
  parameter int unsigned SS_DIV  = 1,
  parameter int unsigned SETTLE  = 16,
  parameter int unsigned CAL_OK  = 8,
  parameter int          KI      = 2,
  parameter int          KP      = 16,
  parameter int unsigned GAIN0_PCT = 100,  // conversion error of the Q=0 leg
  parameter int unsigned DEAD_PS   = 5000
) (
  input  logic                     clk_fs,   // switching clock; high phase = set
  input  logic                     rst_n,
  input  logic [15:0]              vg_mv,    // V_g, mV
  input  logic [15:0]              vout_mv,  // v_out(t), mV
  input  logic signed [EBITS-1:0]  e,        // quantized error from the ADC
  input  logic                     recal,    // request a new calibration
  output logic                     c1,       // high-side gate drive
  output logic                     c2,       // low-side gate drive
  output logic                     q,        // PWM latch output
  output logic                     reset,    // end of on-time from the observer
  output logic [NBITS-1:0]         ic,       // current command i_c[n]
  output logic [NBITS-1:0]         iobs,     // observed current (binary)
  output logic [2**JBITS-1:0]      iobs_line,// delay-line outputs i'_obs
  output logic [NBITS-JBITS-1:0]   count,    // observer counter
  output logic                     sat_lo,
  output logic                     sat_hi,
  output scm_mode_e                mode,
  output logic [K_BITS-1:0]        k_code
);
  logic [23:0]      i_bias_na, i1_na, i0_na;
  logic             inject_en, inject_en_q, inject;
  logic [NBITS-1:0] ic_limit;

  // inject_en changes on the rising edge of clk_fs; it is retimed to the
  // falling edge so the gated set phase never carries a glitch.
  always_ff @(negedge clk_fs or negedge rst_n)
    if (!rst_n) inject_en_q <= 1'b1;
    else        inject_en_q <= inject_en;

  // The injection lasts four rising-slope cell delays (I1 / 4 into one
  // cell) from the start of the set phase: long enough for the outputs of
  // the cleared elements to settle, and a fixed four LSB, so the pulse
  // leaves INJ at the same observed current whatever the set phase.
  logic        clk_d;
  logic [23:0] i_hold_na;

  assign i_hold_na = i1_na >> 2;

  delay_cell u_inj_dly (.a(clk_fs), .i_bias_na(i_hold_na), .y(clk_d));

  assign inject = ~rst_n | (inject_en_q & clk_fs & ~clk_d);

  delay_control #(.GAIN0_PCT(GAIN0_PCT)) u_dctl (
    .vg_mv(vg_mv), .vout_mv(vout_mv), .q(q), .k_code(k_code),
    .i_bias_na(i_bias_na), .i1_na(i1_na), .i0_na(i0_na));

  hybrid_observer #(.NBITS(NBITS), .JBITS(JBITS)) u_obs (
    .dir(q), .i_bias_na(i_bias_na), .inject(inject),
    .inj_point(NBITS'(INJ)), .ic(ic), .reset(reset), .y(iobs_line),
    .q_line(), .count(count), .iobs(iobs), .sat_lo(sat_lo), .sat_hi(sat_hi));

  pwm_latch u_pwm (.en(rst_n), .set(clk_fs), .reset(reset), .q(q));

  dead_time #(.DEAD_PS(DEAD_PS)) u_dt (.en(rst_n), .q(q), .c1(c1), .c2(c2));

  digital_compensator #(.NBITS(NBITS), .EBITS(EBITS), .KI(KI), .KP(KP)) u_comp (
    .clk(clk_fs), .rst_n(rst_n), .e(e), .ic_limit(ic_limit), .ic(ic));

  calib_ctrl #(.NBITS(NBITS), .EBITS(EBITS), .INJ(INJ), .SS_DIV(SS_DIV),
               .SETTLE(SETTLE), .CAL_OK(CAL_OK)) u_cal (
    .clk(clk_fs), .rst_n(rst_n), .e(e), .iobs(iobs), .recal(recal),
    .mode(mode), .inject_en(inject_en), .k_code(k_code), .ic_limit(ic_limit));
endmodule
