`timescale 1ps/1ps
// Voltage-loop compensator: a proportional-integral law, updated once per
// switching period, that turns the quantized output-voltage error e[n]
// into the NBITS-bit current command i_c[n]:
//   acc[n]   = clamp(acc[n-1] + KI*e[n], 0, limit)          (FRAC fraction bits)
//   i_c[n]   = clamp(acc[n] + KP*e[n], 0, limit) >> FRAC
// limit is ic_limit (the soft-start ramp) scaled by 2**FRAC, which also keeps
// the integrator from winding up. i_c[n] is registered and so is valid one
// clock after e[n]. The design names a digital compensator but does not give
// its law, so the PI form, the gains and the widths are this design's own.
module digital_compensator #(
  parameter int unsigned NBITS = scm_pkg::N_BITS,
  parameter int unsigned EBITS = 8,    // width of e[n] (two's complement)
  parameter int unsigned FRAC  = 8,    // fraction bits of the integrator
  parameter int          KI    = 2,    // integral gain, in 2**-FRAC LSB per error LSB
  parameter int          KP    = 16    // proportional gain, in 2**-FRAC LSB per error LSB
) (
  input  logic                    clk,       // once per switching period
  input  logic                    rst_n,
  input  logic signed [EBITS-1:0] e,         // quantized error V_ref - v_out
  input  logic [NBITS-1:0]        ic_limit,  // upper limit of i_c[n]
  output logic [NBITS-1:0]        ic         // current command i_c[n]
);
  localparam int unsigned AW = NBITS + FRAC + 2;
  typedef logic signed [AW-1:0] acc_t;

  acc_t acc, acc_sum, acc_nxt, out_sum, lim;

  always_comb begin
    lim     = acc_t'({2'b00, ic_limit, FRAC'(0)});
    acc_sum = acc + acc_t'(KI) * acc_t'(e);
    if (acc_sum < 0)        acc_nxt = '0;
    else if (acc_sum > lim) acc_nxt = lim;
    else                    acc_nxt = acc_sum;
    out_sum = acc_nxt + acc_t'(KP) * acc_t'(e);
    if (out_sum < 0)        out_sum = '0;
    else if (out_sum > lim) out_sum = lim;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      ic  <= '0;
    end else begin
      acc <= acc_nxt;
      ic  <= out_sum[FRAC +: NBITS];
    end
  end
endmodule
