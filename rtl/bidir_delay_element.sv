`timescale 1ps/1ps
// One element of the bi-directional delay line: two multiplexers steered by
// dir, an S-R latch and a delay cell. A is the output of the left neighbour
// and B that of the right neighbour. With dir=1 the latch is set by A and
// cleared by B, so a pulse arriving from the left is passed on to the right
// and the element clears itself once its right neighbour has fired; with
// dir=0 the roles swap and the pulse travels left. The latch is set-dominant.
// force_clr/force_set (clear has priority) let the start circuitry place the
// pulse. Which multiplexer input feeds S and which feeds R is read from the
// element's function; the set priority and the force inputs are this
// design's own choices.
// The latch is intended: the delay line is self-timed and holds its state in
// S-R latches (the latch warning stands for that reason).
module bidir_delay_element #(
  parameter int unsigned Q_SW_AC = 43200
) (
  input  logic a,          // output of the left neighbour
  input  logic b,          // output of the right neighbour
  input  logic dir,        // 1: propagate right (Q=1), 0: propagate left
  input  logic force_set,  // start circuitry: hold this element set
  input  logic force_clr,  // start circuitry: hold this element clear
  input  logic [23:0] i_bias_na,  // delay-cell bias from the delay control block
  output logic q,          // latch state
  output logic y           // delayed output, one bit of i'_obs
);
  logic s, r;

  always_comb begin
    s = dir ? a : b;
    r = dir ? b : a;
  end

  always_latch begin
    if (force_clr)      q = 1'b0;
    else if (force_set) q = 1'b1;
    else if (s)         q = 1'b1;
    else if (r)         q = 1'b0;
  end

  delay_cell #(.Q_SW_AC(Q_SW_AC)) u_cell (.a(q), .i_bias_na(i_bias_na), .y(y));
endmodule
