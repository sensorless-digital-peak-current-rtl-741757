`timescale 1ps/1ps
// Hybrid delay-line / counter current observer. A single pulse travels along
// a wrapped line of 2**JBITS bi-directional delay elements: to the right
// while dir (= Q) is 1, to the left while it is 0, at a speed set by the
// delay control block so that its position follows the inductor current.
// The counter adds the upper NBITS-JBITS bits each time the pulse wraps.
// reset is raised, while dir is 1, once the count equals i_c<N-1:j> and
// the pulse reaches the cell that i_c<j-1:0> selects through the
// 2**JBITS-to-1 multiplexer (the selected output high and the next one
// still low, i.e. the pulse front is there); it is also raised while the count is above
// i_c<N-1:j>, so that a command lowered below the present current resets the
// latch at once. Saturation: at count 0 the wrap from element 0 to the last
// element is blocked, and at the maximum count the wrap from the last
// element to element 0 is blocked, so the pulse stops (parks) at 0 or at
// 2**NBITS-1. Start: while inject is high every element is cleared except
// the one at inj_point, and the counter is loaded with its upper bits.
// inject must last longer than one cell delay. iobs is the binary value of
// the pulse front (the most advanced element whose output is high, in the
// direction of travel), for calibration and observation.
// The line, counter, multiplexer and comparison follow the design; the
// "count above" term, the front qualification of the multiplexer output,
// the blocking of the wrap link as the saturation
// circuit, the injection scheme and the binary iobs are this design's own.
module hybrid_observer #(
  parameter int unsigned NBITS   = scm_pkg::N_BITS,
  parameter int unsigned JBITS   = scm_pkg::J_BITS,
  parameter int unsigned Q_SW_AC = 43200
) (
  input  logic                  dir,        // Q: 1 while the inductor current rises
  input  logic [23:0]           i_bias_na,  // delay-cell bias from the delay control
  input  logic                  inject,     // start circuitry: place the pulse
  input  logic [NBITS-1:0]      inj_point,  // where the pulse is placed
  input  logic [NBITS-1:0]      ic,         // current command i_c[n]
  output logic                  reset,      // resets the PWM latch
  output logic [2**JBITS-1:0]   y,          // i'_obs: delay element outputs
  output logic [2**JBITS-1:0]   q_line,     // latch states of the delay elements
  output logic [NBITS-JBITS-1:0] count,     // counter value
  output logic [NBITS-1:0]      iobs,       // binary observed current
  output logic                  sat_lo,     // parked at 0
  output logic                  sat_hi      // parked at the top
);
  localparam int unsigned J     = 2**JBITS;
  localparam int unsigned CBITS = NBITS - JBITS;

  logic [J-1:0] a_in, b_in, f_set, f_clr;
  logic         at_min, at_max;   // stored count at its limits
  logic [JBITS-1:0] inj_lo, ic_lo, front;
  logic [CBITS-1:0] inj_hi, ic_hi;

  assign {inj_hi, inj_lo} = inj_point;
  assign {ic_hi, ic_lo}   = ic;

  // Neighbour connections, with the wrap links gated by saturation.
  always_comb begin
    for (int k = 0; k < J; k++) begin
      // A wrap link is blocked only in the direction in which it sets.
      a_in[k]  = (k == 0)     ? (y[J-1] & ~(at_max &  dir)) : y[(k+J-1)%J];
      b_in[k]  = (k == J - 1) ? (y[0]   & ~(at_min & ~dir)) : y[(k+1)%J];
      f_set[k] = inject & (inj_lo == JBITS'(k));
      f_clr[k] = inject & (inj_lo != JBITS'(k));
    end
  end

  for (genvar k = 0; k < J; k++) begin : g_line
    bidir_delay_element #(.Q_SW_AC(Q_SW_AC)) u_elem (
      .a(a_in[k]), .b(b_in[k]), .dir(dir),
      .force_set(f_set[k]), .force_clr(f_clr[k]),
      .i_bias_na(i_bias_na), .q(q_line[k]), .y(y[k]));
  end

  obs_counter #(.CBITS(CBITS)) u_count (
    .y_first(y[0]), .y_last(y[J-1]), .dir(dir),
    .load(inject), .load_val(inj_hi),
    .count(count), .at_min(at_min), .at_max(at_max));

  // Digital comparator: 2**JBITS-to-1 multiplexer, count equality, AND.
  // The selected output only matches while the next one is still low, so
  // that the trailing output of the previous segment, still high when the
  // count has advanced at the wrap, cannot match early.
  logic [JBITS-1:0] ic_nxt;
  logic             sel_front;
  assign ic_nxt    = ic_lo + 1'b1;
  assign sel_front = y[ic_lo] & ~y[ic_nxt];
  assign reset     = dir & (((count == ic_hi) & sel_front) | (count > ic_hi));

  // Pulse front in the direction of travel.
  always_comb begin
    front = '0;
    for (int k = J - 1; k >= 0; k--) begin
      if (y[k] && !(dir ? y[(k+1)%J] : y[(k+J-1)%J])) front = JBITS'(k);
    end
  end

  assign iobs   = {count, front};
  assign sat_lo = at_min & ~dir & y[0]   & ~y[1];
  assign sat_hi = at_max &  dir & y[J-1] & ~y[J-2];
endmodule
