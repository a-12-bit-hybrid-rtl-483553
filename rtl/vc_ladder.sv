// vc_ladder: behavioural model of the Vc generator (resistor ladder from
// Vref, tap switches and the op-amp driving stage). Not synthesizable
// logic: the real part is analog; voltages are modelled as integers in mV.
//
// The ladder's nine tap voltages are the calibration table's values,
// highest first (SS/-40 C ... ff/125 C). The one-hot select from pt_lut
// connects one tap to a unity-gain buffer whose output is Vc. With no tap
// selected the buffer input is undefined; the model then gives 0 mV.
// The buffer's settling time is SETTLE_PS (a value of this design's own;
// the document gives none).
module vc_ladder
  import hdpwm_pkg::*;
#(
  parameter int SETTLE_PS = 1000
) (
  input  logic [N_VC-1:0]  tap_sel,  // one-hot tap select
  output logic [VC_W-1:0]  vc_mv     // Vc in mV
);
  timeunit 1ps; timeprecision 1ps;

  localparam int TAP_MV [N_VC] = '{620, 610, 602, 510, 500, 480, 400, 385, 370};

  logic [VC_W-1:0] tap_v;

  always_comb begin
    tap_v = '0;
    for (int i = 0; i < N_VC; i++)
      if (tap_sel[i]) tap_v = VC_W'(TAP_MV[i]);
  end

  initial vc_mv = '0;

  always @(tap_v) begin
    #(SETTLE_PS);
    vc_mv = tap_v;
  end

endmodule
