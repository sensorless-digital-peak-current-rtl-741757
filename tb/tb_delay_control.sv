`timescale 1ps/1ps
// Testbench for the delay control block: for random V_g, v_out and mirror
// codes the two leg currents must be (V_g - v_out)/R and v_out/(K R) with
// R = 100 kOhm and K = k/128, within 1 nA, clamped at the 0.5 uA floor, and
// the bias must follow Q.
module tb_delay_control;
  logic [15:0] vg_mv, vout_mv;
  logic        q;
  logic [7:0]  k_code;
  logic [23:0] i_bias_na, i1_na, i0_na;
  int checks = 0, failures = 0;

  delay_control dut (.vg_mv(vg_mv), .vout_mv(vout_mv), .q(q), .k_code(k_code),
                     .i_bias_na(i_bias_na), .i1_na(i1_na), .i0_na(i0_na));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real want(input real ua);
    return (ua < 0.5) ? 500.0 : ua * 1000.0;
  endfunction

  initial begin
    int n_floor = 0;
    repeat (300) begin
      real vg, vo, k, e1, e0;
      vg_mv   = 16'($urandom_range(1800, 5000));
      vout_mv = 16'($urandom_range(0, 2500));
      k_code  = 8'($urandom_range(64, 255));
      q       = 1'($urandom_range(0, 1));
      #1ns;
      vg = real'(vg_mv) / 1000.0; vo = real'(vout_mv) / 1000.0; k = real'(k_code) / 128.0;
      e1 = want((vg > vo) ? (vg - vo) / 100.0e3 * 1.0e6 : 0.0);
      e0 = want(vo / (k * 100.0e3) * 1.0e6);
      if (e0 == 500.0 || e1 == 500.0) n_floor++;
      check(real'(i1_na) > e1 - 1.01 && real'(i1_na) < e1 + 1.01,
            $sformatf("I1 %0d nA, want %0.1f", i1_na, e1));
      check(real'(i0_na) > e0 - 1.01 && real'(i0_na) < e0 + 1.01,
            $sformatf("I0 %0d nA, want %0.1f", i0_na, e0));
      check(i_bias_na == (q ? i1_na : i0_na), "bias follows Q");
    end
    // design point: V_g - v_out = 2.7 V gives 27 uA, i.e. 1.6 ns per cell
    vg_mv = 16'd4200; vout_mv = 16'd1500; q = 1; k_code = 8'd128;
    #1ns;
    check(i_bias_na == 24'd27000, "27 uA at 2.7 V");
    vout_mv = 16'd0; q = 0;
    #1ns;
    check(i_bias_na == 24'd500, "floor at v_out = 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
