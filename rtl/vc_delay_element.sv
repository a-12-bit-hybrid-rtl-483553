// vc_delay_element: behavioural model of the voltage-controlled delay
// element. Not synthesizable: the real part is a transistor circuit.
//
// The circuit is an inverter with an extra NMOS (Mc) in its pull-down,
// gated by the global control voltage Vc, followed by a gain-boost inverter
// that sharpens the edges and restores full swing; the element as a whole
// is non-inverting. Its delay follows the propagation-delay law of that
// inverter, t = A + S * B / Vc^2: a pull-up term independent of Vc and a
// pull-down term inversely proportional to Vc^2. The document gives the law
// but no device values; this model uses A = 20 ps and B = 20 ps*V^2
// (100 ps at Vc = 500 mV for S = 1). S is the pull-down weakness of the
// process corner and temperature; it is taken as 4 * Vc_cal^2, Vc_cal
// being the calibration voltage chosen for that corner and temperature, so
// that calibration restores the nominal delay (linear in temperature
// between the characterised -40, 25 and 125 C). SCALE multiplies the delay
// (1 for a 1X cell, 8 for a 4X cell).
//
// Timing: vout takes the value of vin one delay after vin changes; inputs
// that change faster than the delay are not reproduced. t_ps shows the
// present delay; vout starts at INIT.
module vc_delay_element
  import hdpwm_pkg::*;
#(
  parameter int A_PS    = 20,  // Vc-independent delay part, ps
  parameter int B_PS_V2 = 20,  // Vc-dependent delay part, ps * V^2
  parameter int SCALE   = 1,   // delay multiplier of this element
  parameter bit INIT    = 1'b0 // output level at time zero
) (
  input  logic             vin,
  input  logic [VC_W-1:0]  vc_mv,   // control voltage Vc in mV
  input  corner_e          corner,  // environment: process corner
  input  int               temp_c,  // environment: temperature in degC
  output logic             vout,
  output int               t_ps     // present delay
);
  timeunit 1ps; timeprecision 1ps;

  // S in units of 1/10000, at -40, 25 and 125 C
  localparam int T_PT [3] = '{-40, 25, 125};
  localparam int S_SS [3] = '{15376, 14884, 14496};
  localparam int S_TT [3] = '{10404, 10000,  9216};
  localparam int S_FF [3] = '{ 6400,  5929,  5476};

  function automatic int interp(input int s[3], input int t);
    int k;
    k = (t < T_PT[1]) ? 0 : 1;
    return s[k] + ((s[k+1] - s[k]) * (t - T_PT[k])) / (T_PT[k+1] - T_PT[k]);
  endfunction

  // t = A + S * B / Vc^2 with S in 1/10000 and Vc in mV:
  // S/1e4 * B / (v/1e3)^2 = S * B * 100 / v^2
  function automatic int delay_ps(input logic [VC_W-1:0] v, input corner_e c, input int t);
    longint s, vv, dly;
    unique case (c)
      CORNER_SS: s = longint'(interp(S_SS, t));
      CORNER_FF: s = longint'(interp(S_FF, t));
      default:   s = longint'(interp(S_TT, t));
    endcase
    vv  = (v == '0) ? 64'd1 : longint'(v) * longint'(v);
    dly = longint'(A_PS) + (s * longint'(B_PS_V2) * 100 + vv / 2) / vv;
    if (dly > 1000000) dly = 1000000;
    return (dly < 1) ? 1 : int'(dly);
  endfunction

  assign t_ps = SCALE * delay_ps(vc_mv, corner, temp_c);

  initial vout = INIT;

  always begin
    @(vin);
    #(t_ps);
    vout = vin;
  end

endmodule
