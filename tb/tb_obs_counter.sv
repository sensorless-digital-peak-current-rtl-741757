`timescale 1ps/1ps
// Testbench for the segment counter of the observer. It plays the outputs
// of the two end elements as a pulse would drive them: passing the wrap
// upwards (last, then both, then first), downwards (first, both, last), and
// turning back while it straddles the wrap. A reference count is kept in
// the testbench; it must match at every step, stop at both ends, and the
// load must set it.
module tb_obs_counter;
  logic       y_first = 0, y_last = 0, dir = 1, load = 0;
  logic [3:0] load_val = '0, count;
  logic       at_min, at_max;
  int ref_cnt;
  int checks = 0, failures = 0;

  obs_counter dut (.y_first(y_first), .y_last(y_last), .dir(dir), .load(load),
                   .load_val(load_val), .count(count), .at_min(at_min), .at_max(at_max));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s: count=%0d want %0d", $time, what, count, ref_cnt); end
  endtask

  task automatic step(input logic f, input logic l);
    #2ns y_first = f; y_last = l;
    #2ns;
  endtask

  initial begin : watchdog
    #100us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_up = 0, n_dn = 0, n_back = 0, n_sat = 0;
    #1ns;
    load_val = 4'($urandom_range(0, 15));
    load = 1; #2ns load = 0; ref_cnt = int'(load_val);
    #1ns check(int'(count) == ref_cnt, "load");
    repeat (400) begin
      int kind;
      kind = $urandom_range(0, 2);
      dir = 1'($urandom_range(0, 1));
      if (kind == 2) begin
        // turn back inside the straddle
        if (dir) begin step(0, 1); step(1, 1); dir = 0; step(0, 1); step(0, 0); end
        else     begin step(1, 0); step(1, 1); dir = 1; step(1, 0); step(0, 0); end
        n_back++;
        check(int'(count) == ref_cnt, "turn back at the wrap");
      end else if (dir) begin
        step(0, 1); step(1, 1);
        if (ref_cnt < 15) check(int'(count) == ref_cnt + 1, "count ahead while straddling up");
        step(1, 0);
        if (ref_cnt < 15) begin ref_cnt++; n_up++; end else n_sat++;
        check(int'(count) == ref_cnt && at_max == (ref_cnt == 15), "wrap up");
        step(0, 0);
      end else begin
        step(1, 0); step(1, 1);
        if (ref_cnt > 0) check(int'(count) == ref_cnt - 1, "count ahead while straddling down");
        step(0, 1);
        if (ref_cnt > 0) begin ref_cnt--; n_dn++; end else n_sat++;
        check(int'(count) == ref_cnt && at_min == (ref_cnt == 0), "wrap down");
        step(0, 0);
      end
      if ($urandom_range(0, 49) == 0) begin
        load_val = 4'($urandom_range(0, 15));
        load = 1; #2ns load = 0; ref_cnt = int'(load_val);
        #1ns check(int'(count) == ref_cnt, "reload");
      end
    end
    // drive to both ends
    dir = 1; repeat (20) begin step(0, 1); step(1, 1); step(1, 0); step(0, 0); end
    check(count == 4'd15 && at_max, "stops at the top");
    dir = 0; repeat (20) begin step(1, 0); step(1, 1); step(0, 1); step(0, 0); end
    ref_cnt = 0;
    check(count == 4'd0 && at_min, "stops at the bottom");
    check(n_up > 0 && n_dn > 0 && n_back > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
