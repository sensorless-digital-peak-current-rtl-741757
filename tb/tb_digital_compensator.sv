`timescale 1ps/1ps
// Testbench for the voltage-loop compensator: random error sequences and
// limits are fed once per clock and i_c[n] is compared with a reference PI
// law written with integers (integrator and output clamped to [0, limit],
// eight fraction bits).
module tb_digital_compensator;
  logic              clk = 0, rst_n = 0;
  logic signed [7:0] e = '0;
  logic [8:0]        ic_limit = 9'd60, ic;
  int checks = 0, failures = 0;

  digital_compensator dut (.clk(clk), .rst_n(rst_n), .e(e), .ic_limit(ic_limit), .ic(ic));

  always #5ns clk = ~clk;

  initial begin : watchdog
    #200us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int acc_m = 0, ic_m = 0;

  initial begin
    int n_top = 0, n_bot = 0;
    #12ns rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int s, o, lim, bias;
      bias = (cyc < 1000) ? 15 : (cyc < 2000) ? -30 : 0;  // reach both clamps
      if (cyc >= 1000 && $urandom_range(0, 199) == 0) ic_limit = 9'($urandom_range(40, 511));
      e = 8'($signed($urandom_range(0, 255)));
      if ($urandom_range(0, 2) != 0) e = 8'($signed($urandom_range(0, 40)) - 20 + bias);
      lim = int'(ic_limit) * 256;
      s = acc_m + 2 * int'(e);
      s = (s < 0) ? 0 : (s > lim) ? lim : s;
      acc_m = s;
      o = s + 16 * int'(e);
      o = (o < 0) ? 0 : (o > lim) ? lim : o;
      ic_m = o / 256;
      if (o == lim) n_top++;
      if (o == 0) n_bot++;
      @(negedge clk);
      checks++;
      if (int'(ic) != ic_m) begin
        failures++;
        $display("FAIL t=%0t e=%0d ic=%0d want %0d", $time, e, ic, ic_m);
      end
    end
    checks++;
    if (n_top == 0 || n_bot == 0) begin failures++; $display("FAIL clamps not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
