`timescale 1ps/1ps
// Testbench for the delay cell model: for random bias currents the delay of
// each edge must be Q_SW / I (43.2 fC / I), and a pulse narrower than one
// delay must not reach the output.
module tb_delay_cell;
  logic        a = 1'b0;
  logic [23:0] bias = 24'd27000;
  logic        y;
  int checks = 0, failures = 0;

  delay_cell dut (.a(a), .i_bias_na(bias), .y(y));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin : watchdog
    #10us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ns;
    check(y == a, "output settles to the input");
    repeat (30) begin
      int unsigned i_na, d_ps;
      realtime t0;
      i_na = $urandom_range(8000, 60000);
      d_ps = 43200000 / i_na;
      bias = 24'(i_na);
      #1ns;
      a = ~a; t0 = $realtime;
      @(y);
      check(($realtime - t0) >= real'(d_ps) - 1.0 && ($realtime - t0) <= real'(d_ps) + 1.0,
            $sformatf("delay %0t ps at %0d nA, want %0d", $realtime - t0, i_na, d_ps));
      #(d_ps * 2ps);
      // narrow glitch: half a delay
      a = ~a; #(d_ps / 2 * 1ps); a = ~a;
      #(d_ps * 2ps);
      check(y == a, "glitch swallowed, output unchanged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
