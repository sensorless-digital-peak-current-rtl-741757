`timescale 1ps/1ps
// UP/DOWN counter of the hybrid current observer. It holds the upper N-j
// bits of the observed current and changes when the pulse wraps around the
// delay line. Crossing the wrap point, the pulse spends about one cell delay
// with the outputs of both the last element and element 0 high (the
// straddle). The side it came from is the direction at the start of the
// straddle (dir=1: from the last element, moving up); the side it ends on is
// the output still high when the straddle ends. A straddle that ends on the
// other side counts +1 or -1; one that is undone by a reversal counts
// nothing. A reversal makes the pulse reappear two elements back; next to
// the wrap point this either keeps both outputs high, or starts a new
// straddle, so the same rule covers it. During a straddle the output
// already includes the crossing in progress when the pulse front is on the
// far side, so count and pulse position always agree. The count stops at 0
// and at its maximum (saturation); load sets it asynchronously for the
// start circuitry. That the last cell clocks the counter follows the
// design; the straddle rule is this design's own.
module obs_counter #(
  parameter int unsigned CBITS = 4
) (
  input  logic             y_first,   // output of element 0
  input  logic             y_last,    // output of the last element
  input  logic             dir,       // direction of travel (Q)
  input  logic             load,      // asynchronous load (active high)
  input  logic [CBITS-1:0] load_val,  // count placed by load
  output logic [CBITS-1:0] count,     // upper bits of the observed current
  output logic             at_min,    // stored count is 0
  output logic             at_max     // stored count is all ones
);
  logic [CBITS-1:0] cnt;
  logic             straddle, from_last;

  assign straddle = y_first & y_last;
  assign at_min   = (cnt == '0);
  assign at_max   = (cnt == '1);

  always_ff @(posedge straddle or posedge load) begin
    if (load) from_last <= 1'b0;
    else      from_last <= dir;
  end

  always_ff @(negedge straddle or posedge load) begin
    if (load)                                  cnt <= load_val;
    else if ( from_last && y_first && !at_max) cnt <= cnt + 1'b1;
    else if (!from_last && y_last  && !at_min) cnt <= cnt - 1'b1;
  end

  always_comb begin
    count = cnt;
    if (straddle &&  from_last &&  dir && !at_max) count = cnt + 1'b1;
    if (straddle && !from_last && !dir && !at_min) count = cnt - 1'b1;
  end
endmodule
