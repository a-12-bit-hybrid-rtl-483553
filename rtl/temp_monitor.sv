// temp_monitor: behavioural model of the temperature monitor (start-up
// circuit, PTAT current generator and the op-amp output stage
// Vout = Vref - (R2/R1) * VT * ln(n)). Not synthesizable: the real part is
// analog. Inputs are the environment the circuit senses (process corner and
// die temperature); the output is an integer voltage in mV.
//
// The model reproduces the characterised output: at -40, 25 and 125 C and
// the ff / tt / ss corners it gives the document's simulated voltages, and
// in between it interpolates linearly in temperature (the PTAT law is
// linear in absolute temperature). Outside -40..125 C it extrapolates the
// nearest segment. The output falls with temperature and moves only a few
// mV with the process corner.
module temp_monitor
  import hdpwm_pkg::*;
(
  input  corner_e  corner,   // environment: process corner
  input  int       temp_c,   // environment: temperature in degC
  output int       vout_mv   // monitor output
);
  timeunit 1ps; timeprecision 1ps;

  // characterised points, index [corner][temperature point]
  localparam int T_PT [3] = '{-40, 25, 125};
  localparam int V_SS [3] = '{780, 706, 593};
  localparam int V_TT [3] = '{775, 700, 585};
  localparam int V_FF [3] = '{769, 693, 575};

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
