`timescale 1ps/1ps
// Delay control block for a buck converter. Two V/I converters with
// resistors R turn the slopes into bias currents:
//   I1 = (V_g - v_out) / R            (proportional to m1, used while Q=1)
//   I0 = v_out / (K * R)              (proportional to |m2|, used while Q=0)
// where K is the ratio of the programmable current mirror, K = k_code/K_NOM.
// The selected current is mirrored into M_S of every delay cell, so the
// pulse speed is proportional to the inductor current slope. The two
// non-overlapping switches are modelled as an ideal change of the bias when
// Q changes. GAIN1_PCT/GAIN0_PCT model the conversion errors (the
// V-to-delay non-linearity) that calibration must remove. The analog
// voltages arrive as millivolt codes and the currents leave as nanoampere
// codes, so the block is plain integer arithmetic. R = 100 kOhm makes one
// delay 1.6 ns at V_g - v_out = 2.7 V with the default delay cell; R, the
// error terms and the minimum current are this model's own choices.
module delay_control #(
  parameter int unsigned R_KOHM    = 100,
  parameter int unsigned GAIN1_PCT = 100,  // error factor on I1, percent
  parameter int unsigned GAIN0_PCT = 100,  // error factor on I0, percent
  parameter int unsigned I_MIN_NA  = 500,  // bias floor (start-up, v_out = 0)
  parameter int unsigned K_BITS    = scm_pkg::K_BITS,
  parameter int unsigned K_NOM     = scm_pkg::K_NOM,
  parameter int unsigned VBITS     = 16,
  parameter int unsigned IBITS     = 24
) (
  input  logic [VBITS-1:0]  vg_mv,      // input voltage V_g, mV
  input  logic [VBITS-1:0]  vout_mv,    // output voltage v_out(t), mV
  input  logic              q,          // PWM state
  input  logic [K_BITS-1:0] k_code,     // programmable mirror ratio code
  output logic [IBITS-1:0]  i_bias_na,  // bias of the delay cells, nA
  output logic [IBITS-1:0]  i1_na,      // I1 (Q=1 leg)
  output logic [IBITS-1:0]  i0_na       // I0 (Q=0 leg)
);
  localparam logic [IBITS-1:0] IMAX = '1;
  logic [VBITS-1:0]  dv;
  logic [K_BITS-1:0] k_eff;
  logic [47:0]       i1_raw, i0_raw;

  always_comb begin
    dv     = (vg_mv > vout_mv) ? (vg_mv - vout_mv) : '0;
    k_eff  = (k_code == '0) ? K_BITS'(1) : k_code;
    // mV * 10 * pct / kOhm = nA (with pct = 100 for no error)
    i1_raw = (48'(dv) * 48'(10 * GAIN1_PCT)) / 48'(R_KOHM);
    i0_raw = (48'(vout_mv) * 48'(10 * GAIN0_PCT) * 48'(K_NOM)) /
             (48'(k_eff) * 48'(R_KOHM));
    i1_na  = (i1_raw < 48'(I_MIN_NA)) ? IBITS'(I_MIN_NA) :
             (i1_raw > 48'(IMAX))     ? IMAX : i1_raw[IBITS-1:0];
    i0_na  = (i0_raw < 48'(I_MIN_NA)) ? IBITS'(I_MIN_NA) :
             (i0_raw > 48'(IMAX))     ? IMAX : i0_raw[IBITS-1:0];
    i_bias_na = q ? i1_na : i0_na;
  end
endmodule
