`timescale 1ps/1ps
// Testbench for the dead-time generator: for random PWM pulse widths the
// high-side drive must turn on 5 ns after Q rises and off with Q, the low
// side on 5 ns after Q falls, both never on together, and a pulse shorter
// than the dead time must not turn on the high side.
module tb_dead_time;
  logic en = 0, q = 0, c1, c2;
  int checks = 0, failures = 0;

  dead_time dut (.en(en), .q(q), .c1(c1), .c2(c2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin : watchdog
    #100us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int overlap = 0;
  always @(c1 or c2) if (c1 && c2) overlap++;

  initial begin
    realtime t0;
    #20ns;
    check(!c1 && !c2, "disabled: both off");
    en = 1;
    #20ns;
    check(!c1 && c2, "enabled, Q low: low side on");
    repeat (40) begin
      int unsigned w;
      w = $urandom_range(8, 200);
      q = 1; t0 = $realtime;
      #1ps check(!c2 && !c1, "Q rise: low side off at once, high side waits");
      @(posedge c1);
      check(($realtime - t0) > 4990.0 && ($realtime - t0) < 5010.0, "high-side dead time");
      #(w * 1ns - ($realtime - t0));
      q = 0; t0 = $realtime;
      #1ps check(!c1 && !c2, "Q fall: high side off at once, low side waits");
      @(posedge c2);
      check(($realtime - t0) > 4990.0 && ($realtime - t0) < 5010.0, "low-side dead time");
      #($urandom_range(10, 100) * 1ns);
    end
    // pulse shorter than the dead time
    q = 1; #3ns; q = 0;
    #20ns;
    check(!c1, "short pulse swallowed");
    check(overlap == 0, "no overlap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
