// Shared constants and types of the sensorless current-mode (SCM) controller.
// The default sizes follow the integrated design: a 32-element delay line
// (5 bits of the current command) and a 4-bit counter, 9 bits in all.
// The operating-mode encoding is this design's own choice.
`timescale 1ps/1ps
package scm_pkg;
  localparam int unsigned N_BITS = 9;  // width of i_c[n] and of the observed current
  localparam int unsigned J_BITS = 5;  // bits resolved by the delay line (2**J_BITS elements)
  localparam int unsigned K_BITS = 8;  // width of the programmable mirror code
  localparam int unsigned K_NOM  = 128; // mirror code for a ratio of exactly 1

  // Operating modes of the start-up / calibration sequence.
  typedef enum logic [1:0] {
    MODE_SOFT_START = 2'd0,  // voltage mode with a rising limit on the command
    MODE_VOLTAGE    = 2'd1,  // voltage mode: pulse injected at the same cell every cycle
    MODE_CALIBRATE  = 2'd2,  // voltage mode while the return slope m2 is trimmed
    MODE_CURRENT    = 2'd3   // peak current mode: pulse follows the inductor current
  } scm_mode_e;
endpackage
