`timescale 1ps/1ps
// Behavioural model of the error ADC for testbenches: at each falling edge
// of clk it quantizes V_ref - v_out with step LSB_V (rounding) and clamps
// the result to the signed EBITS range, so e[n] is stable at the next
// rising edge.
module adc_model #(
  parameter int unsigned EBITS = 8,
  parameter real         LSB_V = 0.04
) (
  input  logic                    clk,
  input  real                     vref,
  input  real                     vout,
  output logic signed [EBITS-1:0] e
);
  real x;
  int  code;
  initial e = '0;
  always @(negedge clk) begin
    x = (vref - vout) / LSB_V;
    code = int'(x);   // real to int conversion rounds to nearest
    if (code > 2**(EBITS-1) - 1) code = 2**(EBITS-1) - 1;
    if (code < -(2**(EBITS-1)))  code = -(2**(EBITS-1));
    e <= EBITS'(code);
  end
endmodule
