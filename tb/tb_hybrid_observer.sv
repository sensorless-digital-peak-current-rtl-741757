`timescale 1ps/1ps
// Self-checking testbench of the hybrid delay-line / counter observer.
// The delay bias is driven directly, so the cell delay is known exactly:
// d1 while dir=1 and d0 while dir=0. The expected observed current is
// integrated independently as elapsed time / delay and compared with iobs
// at the end of every up and down phase. It also checks the wrap of the
// pulse through the counter (both directions), the reset from the
// multiplexer comparison, the parking at 0 and at full scale, and the
// injection, and counts how often each happened.
module tb_hybrid_observer;
  localparam int unsigned NBITS = 9;
  localparam int unsigned JBITS = 5;
  localparam real Q_SW = 43.2;

  logic             dir, inject;
  real              bias;     // uA
  logic [23:0]      bias_na;

  assign bias_na = 24'(int'(bias * 1000.0));
  logic [NBITS-1:0] inj_point, ic, iobs;
  logic             reset, sat_lo, sat_hi;
  logic [31:0]      y, ql;
  logic [3:0]       count;

  int checks = 0, failures = 0;
  int n_wrap_up = 0, n_wrap_dn = 0, n_reset = 0, n_sat_lo = 0, n_sat_hi = 0;
  logic [3:0] last_count;

  hybrid_observer #(.NBITS(NBITS), .JBITS(JBITS)) dut (
    .dir(dir), .i_bias_na(bias_na), .inject(inject), .inj_point(inj_point), .ic(ic),
    .reset(reset), .y(y), .q_line(ql), .count(count), .iobs(iobs),
    .sat_lo(sat_lo), .sat_hi(sat_hi));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s iobs=%0d count=%0d y=%h", $time, what, iobs, count, y);
    end
  endtask

  always @(count) begin
    if (count == last_count + 4'd1) n_wrap_up++;
    if (count == last_count - 4'd1) n_wrap_dn++;
    last_count = count;
  end
  always @(posedge reset) n_reset++;
  always @(posedge sat_lo) n_sat_lo++;
  always @(posedge sat_hi) n_sat_hi++;

  // Run one phase in direction d for t_ns with cell delay d_ns and check
  // that the pulse moved by t_ns/d_ns cells (saturating at the ends).
  real expect_pos;
  task automatic phase(input bit d, input real d_ns, input real t_ns, input real tol);
    dir  = d;
    bias = Q_SW / d_ns;
    #(t_ns * 1ns);
    #1ps;  // step past cell events that fall on the same instant
    expect_pos = d ? expect_pos + t_ns / d_ns : expect_pos - t_ns / d_ns;
    if (expect_pos < 0.0) expect_pos = 0.0;
    if (expect_pos > 511.0) expect_pos = 511.0;
    check((real'(iobs) > expect_pos - tol - 1.0) && (real'(iobs) < expect_pos + tol + 1.0),
          $sformatf("position: expected %0.1f", expect_pos));
    expect_pos = real'(iobs);   // re-anchor, so errors do not add up
  endtask

  initial begin
    #(400us);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dir = 1; bias = Q_SW / 1.6; ic = '1; inj_point = 9'd32;
    inject = 0; last_count = 4'd1;
    #(1ns);
    inject = 1;
    #(20ns);
    check(iobs == 9'd32 && count == 4'd1, "injection point");
    inject = 0;
    expect_pos = 32.0;
    // Up / down phases with varying delays.
    for (int i = 0; i < 40; i++) begin
      real du, dd, tu, td;
      du = 1.2 + 0.1 * real'($urandom_range(0, 10));
      dd = 2.0 + 0.1 * real'($urandom_range(0, 15));
      tu = 60.0 + real'($urandom_range(0, 120));
      td = 60.0 + real'($urandom_range(0, 160));
      phase(1, du, tu, 2.0);
      phase(0, dd, td, 2.0);
    end
    // Drive down into saturation at 0.
    phase(0, 1.5, 900.0, 0.0);
    check(iobs == 0 && sat_lo, "parked at 0");
    #(50ns);
    check(iobs == 0, "stays at 0");
    // Leave 0 again.
    phase(1, 1.5, 150.0, 2.0);
    // Drive up into saturation at the top.
    phase(1, 1.0, 700.0, 0.0);
    check(iobs == 9'd511 && sat_hi, "parked at full scale");
    phase(0, 2.0, 100.0, 2.0);
    // Reset generation: inject at 40, run up towards ic and time the reset.
    for (int i = 0; i < 20; i++) begin
      int target;
      realtime t0, t1;
      target = 48 + $urandom_range(0, 400);
      ic = 9'(target);
      dir = 1; bias = Q_SW / 1.6; inject = 1;
      inj_point = 9'd40;
      #(20ns);
      check(!reset, "no reset at injection");
      inject = 0; t0 = $realtime;
      @(posedge reset); t1 = $realtime;
      check(iobs == 9'(target), $sformatf("reset at ic=%0d", target));
      // The element after the injection point is set on release, so its
      // output, and the front, reach element k after (k - inj) delays.
      check((t1 - t0) > (real'(target - 40) - 0.5) * 1.6ns &&
            (t1 - t0) < (real'(target - 40) + 0.5) * 1.6ns, "reset timing");
      dir = 0; #(30ns);
      check(!reset, "reset drops when dir=0");
    end
    // Reset when the command lies below the pulse.
    ic = 9'd10; dir = 1; #(1ns);
    check(reset, "reset while count above command");
    check(n_wrap_up > 0, "wrap upward seen");
    check(n_wrap_dn > 0, "wrap downward seen");
    check(n_sat_lo > 0 && n_sat_hi > 0, "both saturations seen");
    check(n_reset >= 20, "resets seen");
    $display("wraps up=%0d down=%0d resets=%0d sat_lo=%0d sat_hi=%0d",
             n_wrap_up, n_wrap_dn, n_reset, n_sat_lo, n_sat_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
