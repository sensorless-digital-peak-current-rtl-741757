`timescale 1ps/1ps
// Testbench for one element of the delay line: the latch is set from the
// neighbour on the upstream side and cleared from the one downstream, the
// sides swap with dir, the start inputs override both (clear first), and
// the output follows the latch one cell delay (1.6 ns at 27 uA) later.
module tb_bidir_delay_element;
  logic a = 0, b = 0, dir = 1, fs = 0, fc = 1, q, y;
  logic [23:0] bias = 24'd27000;
  logic q_ref;
  int checks = 0, failures = 0;

  bidir_delay_element dut (.a(a), .b(b), .dir(dir), .force_set(fs), .force_clr(fc),
                           .i_bias_na(bias), .q(q), .y(y));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin : watchdog
    #50us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ns;
    check(q == 0 && y == 0, "force clear");
    fc = 0; q_ref = 0;
    repeat (300) begin
      logic s, r, q_old;
      q_old = q;
      a   = 1'($urandom_range(0, 1));
      b   = 1'($urandom_range(0, 1));
      dir = 1'($urandom_range(0, 1));
      fs  = ($urandom_range(0, 15) == 0);
      fc  = ($urandom_range(0, 15) == 0);
      s = dir ? a : b;
      r = dir ? b : a;
      if (fc)      q_ref = 0;
      else if (fs) q_ref = 1;
      else if (s)  q_ref = 1;
      else if (r)  q_ref = 0;
      #1ps;
      check(q == q_ref, $sformatf("latch dir=%b a=%b b=%b fs=%b fc=%b q=%b", dir, a, b, fs, fc, q));
      #1597ps;
      check(y == q_old, "output holds for one delay");
      #4ps;
      check(y == q, "output follows the latch after one delay");
      #5ns;
      check(y == q, "output settled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
