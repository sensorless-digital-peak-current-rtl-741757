`timescale 1ps/1ps
// PWM S-R latch. set starts the on-time at the beginning of each switching
// period; reset from the current observer ends it. Q is the PWM signal and
// also the direction of the delay line. Set has priority over reset, so the
// on-time lasts at least as long as the set pulse; en=0 holds Q low.
// The priority and the enable are this design's own choices.
// The latch is intended: it is the asynchronous S-R latch of the modulator.
module pwm_latch (
  input  logic en,     // 0: hold Q low
  input  logic set,    // start of the switching period
  input  logic reset,  // end of the on-time
  output logic q
);
  always_latch begin
    if (!en)        q = 1'b0;
    else if (set)   q = 1'b1;
    else if (reset) q = 1'b0;
  end
endmodule
