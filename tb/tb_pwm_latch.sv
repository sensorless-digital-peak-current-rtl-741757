`timescale 1ps/1ps
// Testbench for the PWM S-R latch: random set/reset/enable sequences are
// compared with a reference of the latch (disable first, then set, then
// reset, otherwise hold).
module tb_pwm_latch;
  logic en = 0, set = 0, reset = 0, q;
  logic q_ref = 0;
  int checks = 0, failures = 0;

  pwm_latch dut (.en(en), .set(set), .reset(reset), .q(q));

  initial begin : watchdog
    #10us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_set = 0, n_rst = 0;
    #1ns;
    repeat (400) begin
      en    = ($urandom_range(0, 9) != 0);
      set   = ($urandom_range(0, 3) == 0);
      reset = ($urandom_range(0, 2) == 0);
      if (!en)        q_ref = 0;
      else if (set)   q_ref = 1;
      else if (reset) q_ref = 0;
      #1ns;
      checks++;
      if (en && set) n_set++;
      if (en && !set && reset && q_ref == 0) n_rst++;
      if (q !== q_ref) begin
        failures++;
        $display("FAIL en=%b set=%b reset=%b q=%b want %b", en, set, reset, q, q_ref);
      end
      set = 0; reset = 0;
      #1ns;
      checks++;
      if (q !== q_ref) begin failures++; $display("FAIL hold q=%b want %b", q, q_ref); end
    end
    checks++;
    if (n_set == 0 || n_rst == 0) begin failures++; $display("FAIL set or reset never tried"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
