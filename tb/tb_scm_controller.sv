`timescale 1ps/1ps
// End-to-end testbench of the sensorless current-mode controller at its
// default parameters (9-bit observer: 32-element line and 4-bit counter)
// in closed loop with a buck power stage (V_g = 4.2 V, v_out = 1.5 V,
// L = 2 uH, f_s = 2 MHz) and an error ADC. It runs the whole start-up
// sequence (soft start, voltage mode, calibration of the return slope,
// current mode), then a load step, a second calibration on request and a
// change of V_g, and checks:
//  * the modes follow the sequence and each one is reached;
//  * v_out settles within a window around V_ref in every phase;
//  * after calibration the returning pulse meets the injection point;
//  * in current mode the on-time ends when the observed current reaches
//    i_c[n] (iobs at each reset equals i_c[n] within one LSB);
//  * in current mode the observed current tracks the inductor current:
//    the observed ripple (peak - valley) matches the model's ripple;
//  * dead time: c1 and c2 are never high together.
// It counts injections, resets, counter wraps in both directions,
// saturation at 0 and at full scale, mirror-code steps up and down and
// mode changes, and counts a failure for each mechanism never seen.
module tb_scm_controller;
  import scm_pkg::*;

  localparam real VREF  = 1.5;
  localparam real LSB_A = 2.16e-3;  // observer LSB: 43.2 fC * 100 kOhm / 2 uH

  logic clk_fs = 1'b0, rst_n = 1'b0, recal = 1'b0;
  real  vg = 4.2, vout, il, r_load = 15.0;
  logic [15:0] vg_mv, vout_mv;   // voltages as millivolt codes for the controller

  always_comb begin
    vg_mv   = (vg   > 0.0) ? 16'(int'(vg * 1000.0))   : 16'd0;
    vout_mv = (vout > 0.0) ? 16'(int'(vout * 1000.0)) : 16'd0;
  end
  logic signed [7:0] e;
  logic c1, c2, q, reset, sat_lo, sat_hi;
  logic [8:0] ic, iobs;
  logic [31:0] line;
  logic [3:0] count;
  scm_mode_e mode;
  logic [7:0] k_code;

  int checks = 0, failures = 0;
  int n_inject = 0, n_reset = 0, n_wrap_up = 0, n_wrap_dn = 0, n_sat_lo = 0, n_sat_hi = 0;
  int n_k_up = 0, n_k_dn = 0, n_mode = 0, n_overlap = 0, n_reset_ok = 0, n_reset_bad = 0;
  int n_cycles = 0;

  scm_controller dut (
    .clk_fs(clk_fs), .rst_n(rst_n), .vg_mv(vg_mv), .vout_mv(vout_mv), .e(e), .recal(recal),
    .c1(c1), .c2(c2), .q(q), .reset(reset), .ic(ic), .iobs(iobs), .iobs_line(line),
    .count(count), .sat_lo(sat_lo), .sat_hi(sat_hi), .mode(mode), .k_code(k_code));

  buck_plant u_plant (.c1(c1), .c2(c2), .vg(vg), .r_load(r_load), .vout(vout), .il(il));
  adc_model  u_adc   (.clk(clk_fs), .vref(VREF), .vout(vout), .e(e));

  // 2 MHz switching clock; the 20 ns high phase is the set pulse.
  always begin
    clk_fs = 1'b1; #(20ns);
    clk_fs = 1'b0; #(480ns);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s (vout=%0.3f il=%0.3f ic=%0d iobs=%0d mode=%s k=%0d)",
               $time, what, vout, il, ic, iobs, mode.name(), k_code);
    end
  endtask

  // Mechanism counters.
  logic [3:0] last_count = '0;
  logic [7:0] last_k = 8'd128;
  scm_mode_e  last_mode = MODE_SOFT_START;
  always @(posedge clk_fs) if (rst_n) begin
    n_cycles++;
    if (mode != MODE_CURRENT) n_inject++;
  end
  always @(count) begin
    if (count == last_count + 4'd1) n_wrap_up++;
    if (count == last_count - 4'd1) n_wrap_dn++;
    last_count = count;
  end
  always @(posedge sat_lo) n_sat_lo++;
  always @(posedge sat_hi) n_sat_hi++;
  always @(k_code) begin
    if (k_code > last_k) n_k_up++;
    if (k_code < last_k) n_k_dn++;
    last_k = k_code;
  end
  always @(mode) begin
    if (mode != last_mode) begin
      n_mode++;
      $display("t=%0t mode %s -> %s (vout=%0.3f k=%0d ic=%0d)", $time, last_mode.name(),
               mode.name(), vout, k_code, ic);
    end
    last_mode = mode;
  end
  always @(c1 or c2) if (c1 && c2) n_overlap++;

  // In current mode each reset must come when iobs reaches i_c[n]
  // (resets forced by the end of the set pulse are skipped).
  always @(posedge reset) begin
    n_reset++;
    if (mode == MODE_CURRENT && !clk_fs) begin
      // Q may already have fallen in this instant, which moves the decoded
      // front to the trailing cell: accept i_c - 1 to i_c + 1
      if (iobs + 9'd1 >= ic && iobs <= ic + 9'd1) n_reset_ok++;
      else n_reset_bad++;
    end
  end

  // Observed and model ripple over one period, in current mode.
  real il_pk, il_vy;
  int  ob_pk, ob_vy;
  task automatic measure_ripple(output real il_rip, output int ob_rip);
    @(posedge clk_fs);
    il_pk = -10.0; il_vy = 10.0; ob_pk = 0; ob_vy = 511;
    repeat (500) begin
      #(1ns);
      if (il > il_pk) il_pk = il;
      if (il < il_vy) il_vy = il;
      if (int'(iobs) > ob_pk) ob_pk = int'(iobs);
      if (int'(iobs) < ob_vy) ob_vy = int'(iobs);
    end
    il_rip = il_pk - il_vy;
    ob_rip = ob_pk - ob_vy;
  endtask

  task automatic wait_mode(input scm_mode_e m, input int max_cycles);
    int n = 0;
    while (mode != m && n < max_cycles) begin
      @(posedge clk_fs);
      n++;
    end
    check(mode == m, $sformatf("reached mode %s", m.name()));
  endtask

  task automatic settle_check(input int cycles, input real tol, input string what);
    real vmin = 10.0, vmax = -10.0;
    repeat (cycles) begin
      @(negedge clk_fs);
      if (vout < vmin) vmin = vout;
      if (vout > vmax) vmax = vout;
    end
    check(vmin > VREF - tol && vmax < VREF + tol,
          $sformatf("%s: v_out in [%0.3f, %0.3f]", what, vmin, vmax));
  endtask

  initial begin
    #(8ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real il_rip;
    int  ob_rip;
    #(1us);
    rst_n = 1'b1;
    check(mode == MODE_SOFT_START, "starts in soft start");
    wait_mode(MODE_VOLTAGE, 600);
    wait_mode(MODE_CALIBRATE, 3000);
    settle_check(4, 0.06, "voltage mode");
    wait_mode(MODE_CURRENT, 600);
    // Calibration: the returning pulse met the injection point.
    check(n_k_up + n_k_dn > 0 || k_code == 8'd128, "calibration ran");
    repeat (300) @(posedge clk_fs);
    settle_check(100, 0.06, "current mode, 100 mA");
    for (int i = 0; i < 3; i++) begin
      measure_ripple(il_rip, ob_rip);
      check(real'(ob_rip) * LSB_A > il_rip * 0.8 && real'(ob_rip) * LSB_A < il_rip * 1.2 + 2.0 * LSB_A,
            $sformatf("observed ripple %0d LSB vs inductor ripple %0.1f mA", ob_rip, il_rip * 1000.0));
    end
    // Load step 100 mA -> 200 mA.
    r_load = 7.5;
    repeat (600) @(posedge clk_fs);
    settle_check(100, 0.06, "current mode, 200 mA");
    // Recalibrate on request, then change V_g.
    recal = 1'b1;
    @(posedge clk_fs);
    recal = 1'b0;
    wait_mode(MODE_CALIBRATE, 3000);
    wait_mode(MODE_CURRENT, 600);
    vg = 3.3;
    repeat (600) @(posedge clk_fs);
    settle_check(100, 0.08, "current mode, V_g = 3.3 V");
    // Light load.
    r_load = 100.0;
    repeat (600) @(posedge clk_fs);
    settle_check(100, 0.08, "current mode, 15 mA");

    check(n_overlap == 0, "c1 and c2 never on together");
    check(n_reset_bad == 0 && n_reset_ok > 100,
          $sformatf("resets at i_c in current mode: %0d ok, %0d off", n_reset_ok, n_reset_bad));
    check(n_inject > 0, "injection seen");
    check(n_reset > 0, "reset seen");
    check(n_wrap_up > 0 && n_wrap_dn > 0, "counter wraps seen in both directions");
    check(n_sat_lo > 0, "saturation at 0 seen");
    check(n_sat_hi > 0, "saturation at full scale seen");
    check(n_k_up + n_k_dn > 0, "mirror code steps seen");
    check(n_mode >= 5, "mode changes seen");
    $display("cycles=%0d injections=%0d resets=%0d wraps up=%0d down=%0d sat lo=%0d hi=%0d k steps up=%0d down=%0d modes=%0d k=%0d",
             n_cycles, n_inject, n_reset, n_wrap_up, n_wrap_dn, n_sat_lo, n_sat_hi,
             n_k_up, n_k_dn, n_mode, k_code);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
