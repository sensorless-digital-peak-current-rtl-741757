`timescale 1ps/1ps
// Dead-time generator. Q is delayed by one delay cell biased for DEAD_PS;
// the high-side drive c1 is Q AND its delayed copy, the low-side drive c2
// is NOT Q AND NOT the delayed copy. Each switch therefore turns on DEAD_PS
// after the other has turned off, and a pulse of Q shorter than DEAD_PS
// does not turn on the high side. en=0 keeps both switches off. The
// circuit and the 5 ns default are this design's own choices: the block is
// only named in the design.
module dead_time #(
  parameter int unsigned DEAD_PS = 5000,
  parameter int unsigned Q_SW_AC = 43200
) (
  input  logic en,
  input  logic q,    // PWM signal
  output logic c1,   // high-side switch on
  output logic c2    // low-side switch on
);
  // aC * 1000 / ps = nA
  localparam logic [23:0] BIAS_NA = 24'((Q_SW_AC * 1000) / DEAD_PS);
  logic q_d;

  delay_cell #(.Q_SW_AC(Q_SW_AC)) u_dly (.a(q), .i_bias_na(BIAS_NA), .y(q_d));

  assign c1 = en & q & q_d;
  assign c2 = en & ~q & ~q_d;
endmodule
