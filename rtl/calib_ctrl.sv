`timescale 1ps/1ps
// Start-up and calibration sequencer, clocked once per switching period.
//   SOFT_START: voltage mode (the pulse is injected at INJ every period, so
//               the observer acts as a delay-line DPWM); the limit on i_c[n]
//               rises by one LSB every SS_DIV periods from INJ to full scale.
//   VOLTAGE:    voltage mode until e[n] = 0 for SETTLE periods in a row.
//   CALIBRATE:  still voltage mode; at the end of every period the position
//               of the returning pulse is compared with the target
//               T = INJ - REV_JUMP. In voltage mode the injection holds the
//               pulse at INJ for four rising cell delays after Q rises; in
//               current mode the pulse moves on two cells when Q rises at
//               the valley. A valley at T = INJ - 6 therefore gives the
//               same rise as voltage mode. If the
//               pulse has not come back (iobs > T) the return is too slow and
//               the mirror code K is lowered (more current, shorter delay);
//               if it went further than T - TOL, K is raised. After CAL_OK
//               periods in a row within [T - TOL, T] the sequencer moves on.
//               The window lies below T so that any residual drift in current
//               mode is downward, towards the harmless saturation at 0.
//   CURRENT:    peak current mode: no injection, the pulse follows i_L.
// recal, or a pulse found at full scale at the end of a period (the
// observer has lost the current), returns to VOLTAGE for a new calibration. iobs is sampled at the
// clock edge, before that edge's injection has moved the pulse. The order
// of the steps follows the design; the thresholds, the ramp, the
// one-code-per-period search, the target offset and the recovery from
// full scale are this design's own choices.
module calib_ctrl
  import scm_pkg::*;
#(
  parameter int unsigned NBITS  = N_BITS,
  parameter int unsigned KBITS  = K_BITS,
  parameter int unsigned EBITS  = 8,
  parameter int unsigned INJ    = 48,   // injection point (an iobs value)
  parameter int unsigned SS_DIV = 1,    // periods per soft-start step
  parameter int unsigned SETTLE = 16,   // periods with e[n]=0 before calibrating
  parameter int unsigned REV_JUMP = 6,  // valley target below INJ, in cells
  parameter int unsigned TOL    = 1,    // accepted early return, in observer LSB
  parameter int unsigned CAL_OK = 8,    // periods within TOL to finish
  parameter int unsigned K_INIT = K_NOM
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [EBITS-1:0] e,          // quantized error e[n]
  input  logic [NBITS-1:0]        iobs,       // observed current at the period end
  input  logic                    recal,      // request a new calibration
  output scm_mode_e               mode,
  output logic                    inject_en,  // inject the pulse every period
  output logic [KBITS-1:0]        k_code,     // programmable mirror code
  output logic [NBITS-1:0]        ic_limit    // soft-start limit on i_c[n]
);
  localparam int unsigned CW = 8;
  logic [CW-1:0] run;      // consecutive periods meeting the exit test
  logic [CW-1:0] ss_div;
  logic signed [NBITS+1:0] terr;

  // Target: REV_JUMP below INJ, where a current-mode valley must lie so that
  // the jump at the reversal puts the pulse back at INJ.
  assign terr      = $signed({2'b00, iobs}) - $signed((NBITS+2)'(INJ - REV_JUMP));
  assign inject_en = (mode != MODE_CURRENT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode     <= MODE_SOFT_START;
      run      <= '0;
      ss_div   <= '0;
      k_code   <= KBITS'(K_INIT);
      ic_limit <= NBITS'(INJ);
    end else begin
      unique case (mode)
        MODE_SOFT_START: begin
          if (ss_div == CW'(SS_DIV - 1)) begin
            ss_div <= '0;
            if (ic_limit == '1) mode <= MODE_VOLTAGE;
            else                ic_limit <= ic_limit + 1'b1;
          end else begin
            ss_div <= ss_div + 1'b1;
          end
        end
        MODE_VOLTAGE: begin
          if (e != 0)                       run <= '0;
          else if (run == CW'(SETTLE - 1)) begin run <= '0; mode <= MODE_CALIBRATE; end
          else                              run <= run + 1'b1;
        end
        MODE_CALIBRATE: begin
          if (terr > 0) begin
            run <= '0;
            if (k_code != '0) k_code <= k_code - 1'b1;
          end else if (terr < -$signed((NBITS+2)'(TOL))) begin
            run <= '0;
            if (k_code != '1) k_code <= k_code + 1'b1;
          end else if (run == CW'(CAL_OK - 1)) begin
            run  <= '0;
            mode <= MODE_CURRENT;
          end else begin
            run <= run + 1'b1;
          end
        end
        MODE_CURRENT: begin
          if (recal || iobs == '1) begin
            run  <= '0;
            mode <= MODE_VOLTAGE;
          end
        end
        default: mode <= MODE_SOFT_START;
      endcase
    end
  end
endmodule
