`timescale 1ps/1ps
// Behavioural model of one current-starved delay cell (a current-starved
// inverter followed by a plain inverter, so the cell does not invert).
// The propagation delay is the switched charge divided by the bias current
// that transistor M_S draws: delay = Q_SW_AC / i_bias_na (aC / nA = ns),
// computed in ps. The bias is sampled when the input changes. After each
// input change the model waits one delay and then copies the input as it
// is at that moment, so a narrow glitch that has gone again is swallowed,
// roughly as a starved inverter does. The default charge of 43.2 fC gives
// 1.6 ns at 27 uA, the LSB delay of the integrated design; the charge value
// and the glitch filtering are this model's own choices.
// For synthesis the timing control is dropped and the cell is a buffer.
module delay_cell #(
  parameter int unsigned Q_SW_AC  = 43200,  // switched charge per transition, aC
  parameter int unsigned I_MIN_NA = 50,     // bias below which the cell is this slow
  parameter int unsigned IBITS    = 24
) (
  input  logic             a,          // input (the S-R latch output Q)
  input  logic [IBITS-1:0] i_bias_na,  // bias current through M_S, nA
  output logic             y           // delayed output
);
  logic [IBITS-1:0] i_eff;
  logic [31:0]      dly_ps;

  assign i_eff  = (i_bias_na > IBITS'(I_MIN_NA)) ? i_bias_na : IBITS'(I_MIN_NA);
  assign dly_ps = (Q_SW_AC * 32'd1000) / 32'(i_eff);

  // power-up: the output settles to the input one delay after time zero
  initial begin
    #(dly_ps * 1ps);
    y = a;
  end

  always @(a) begin
    #(dly_ps * 1ps);
    y = a;
  end
endmodule
