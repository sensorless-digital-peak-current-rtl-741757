`timescale 1ps/1ps
// Behavioural model of a synchronous buck power stage for testbenches:
// switch on-resistances, inductor with series resistance, output capacitor
// and a resistive load, integrated with forward Euler every DT_NS. During
// dead time (c1 = c2 = 0) the low-side body diode (or the high-side one, for
// negative current) carries the inductor current. The load can be changed
// through r_load.
module buck_plant #(
  parameter real L_UH   = 2.0,     // inductance
  parameter real C_UF   = 4.7,     // output capacitance
  parameter real RON_P  = 0.338,   // high-side on-resistance, ohm
  parameter real RON_N  = 0.290,   // low-side on-resistance, ohm
  parameter real DCR    = 0.05,    // inductor series resistance, ohm
  parameter real VDIODE = 0.7,     // body-diode drop
  parameter real DT_NS  = 1.0
) (
  input  logic c1,        // high-side on
  input  logic c2,        // low-side on
  input  real  vg,        // input voltage
  input  real  r_load,    // load resistance, ohm
  output real  vout,
  output real  il
);
  real vsw, dt;

  initial begin
    vout = 0.0;
    il   = 0.0;
    dt   = DT_NS * 1.0e-9;
  end

  always begin
    #(DT_NS * 1ns);
    if (c1)           vsw = vg - RON_P * il;
    else if (c2)      vsw = -RON_N * il;
    else if (il > 0)  vsw = -VDIODE;
    else              vsw = vg + VDIODE;
    il   = il + (vsw - DCR * il - vout) * dt / (L_UH * 1.0e-6);
    vout = vout + (il - vout / r_load) * dt / (C_UF * 1.0e-6);
  end
endmodule
