`timescale 1ps/1ps
// Testbench for the start-up and calibration sequencer. It checks the
// soft-start ramp (one LSB per period from the injection point to full
// scale), the wait for SETTLE periods of zero error, the direction of each
// mirror-code step (a late return lowers K, an early one raises it), the
// exit to current mode after CAL_OK good periods, and both ways back to
// voltage mode (recal and an observer found at full scale).
module tb_calib_ctrl;
  import scm_pkg::*;
  localparam int INJ = 48, T = 42, SETTLE = 16, CAL_OK = 8;
  logic              clk = 0, rst_n = 0, recal = 0;
  logic signed [7:0] e = 8'sd5;
  logic [8:0]        iobs = 9'd0, ic_limit;
  logic [7:0]        k_code;
  logic              inject_en;
  scm_mode_e         mode;
  int checks = 0, failures = 0;

  calib_ctrl dut (.clk(clk), .rst_n(rst_n), .e(e), .iobs(iobs), .recal(recal),
                  .mode(mode), .inject_en(inject_en), .k_code(k_code), .ic_limit(ic_limit));

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s (mode=%s k=%0d)", $time, what, mode.name(), k_code); end
  endtask

  initial begin : watchdog
    #100us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    #12ns;
    check(mode == MODE_SOFT_START && ic_limit == 9'(INJ) && k_code == 8'd128, "reset state");
    rst_n = 1;
    n = 0;
    while (mode == MODE_SOFT_START) begin
      @(negedge clk); n++;
      if (mode == MODE_SOFT_START) check(int'(ic_limit) == INJ + n, "ramp step");
      check(inject_en, "injection on in soft start");
    end
    check(n == 511 - INJ + 1, $sformatf("soft start took %0d periods", n));
    check(mode == MODE_VOLTAGE, "voltage mode after soft start");
    // error not yet zero: stays in voltage mode
    repeat (40) begin e = 8'($signed($urandom_range(1, 3))); @(negedge clk); end
    check(mode == MODE_VOLTAGE, "stays in voltage mode while e != 0");
    e = 0;
    repeat (SETTLE - 1) @(negedge clk);
    check(mode == MODE_VOLTAGE, "not yet calibrating");
    @(negedge clk);
    check(mode == MODE_CALIBRATE, "calibrating after SETTLE periods of e = 0");
    // late return: K must fall by one per period
    iobs = 9'(T + 7);
    repeat (5) begin
      automatic logic [7:0] k0 = k_code;
      @(negedge clk);
      check(k_code == k0 - 1, "late return lowers K");
    end
    // early return: K must rise
    iobs = 9'(T - 5);
    repeat (3) begin
      automatic logic [7:0] k0 = k_code;
      @(negedge clk);
      check(k_code == k0 + 1, "early return raises K");
    end
    // inside the window
    iobs = 9'(T);
    repeat (CAL_OK - 1) @(negedge clk);
    check(mode == MODE_CALIBRATE, "still calibrating");
    @(negedge clk);
    check(mode == MODE_CURRENT && !inject_en, "current mode, injection off");
    repeat (20) begin iobs = 9'($urandom_range(0, 510)); @(negedge clk); end
    check(mode == MODE_CURRENT, "stays in current mode");
    recal = 1; @(negedge clk); recal = 0;
    check(mode == MODE_VOLTAGE, "recal returns to voltage mode");
    repeat (SETTLE) @(negedge clk);
    iobs = 9'(T - 1);
    repeat (CAL_OK) @(negedge clk);
    check(mode == MODE_CURRENT, "back in current mode");
    iobs = 9'd511; @(negedge clk);
    check(mode == MODE_VOLTAGE, "full-scale observer returns to voltage mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
