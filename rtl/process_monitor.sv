// process_monitor: behavioural model of the process monitor (start-up
// circuit, PTAT current generator and the output branch
// Vout = VGS(M5) + (R2/R1) * VT * ln(n), with M5 matched to the delay-line
// transistors). Not synthesizable: the real part is analog. Inputs are the
// environment it senses; the output is an integer voltage in mV.
//
// The model reproduces the characterised output: at -40, 25 and 125 C and
// the SS / tt / ff corners it gives the document's simulated voltages
// (about 100 mV between corners, under 15 mV over temperature), and
// interpolates linearly in temperature in between.
module process_monitor
  import hdpwm_pkg::*;
(
  input  corner_e  corner,   // environment: process corner
  input  int       temp_c,   // environment: temperature in degC
  output int       vout_mv   // monitor output
);
  timeunit 1ps; timeprecision 1ps;

  localparam int T_PT [3] = '{-40, 25, 125};
  localparam int V_SS [3] = '{800, 802, 815};
  localparam int V_TT [3] = '{704, 700, 705};
  localparam int V_FF [3] = '{625, 619, 621};

  function automatic int interp(input int v[3], input int t);
    int s;
    s = (t < T_PT[1]) ? 0 : 1;
    return v[s] + ((v[s+1] - v[s]) * (t - T_PT[s])) / (T_PT[s+1] - T_PT[s]);
  endfunction

  always_comb begin
    unique case (corner)
      CORNER_SS: vout_mv = interp(V_SS, temp_c);
      CORNER_FF: vout_mv = interp(V_FF, temp_c);
      default:   vout_mv = interp(V_TT, temp_c);
    endcase
  end

endmodule
