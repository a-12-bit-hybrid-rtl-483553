// flash_adc2: behavioural model of a 2-bit flash ADC (three comparators
// and a thermometer-to-binary encoder). Not synthesizable: the comparators
// are analog; the input voltage is an integer in mV.
//
// Code = number of thresholds the input exceeds: below TH0 -> 00, between
// TH0 and TH1 -> 01, between TH1 and TH2 -> 10, above TH2 -> 11. The
// document gives no thresholds; the defaults are midway between the
// monitor voltages it reports (temperature monitor: 575-593 / 693-706 /
// 769-780 mV), and the process instance overrides them. The encoder counts
// the comparator outputs, so a bubble in the thermometer code is tolerated.
module flash_adc2
  import hdpwm_pkg::*;
#(
  parameter int TH0_MV = 530,
  parameter int TH1_MV = 640,
  parameter int TH2_MV = 740
) (
  input  int        vin_mv,  // analog input
  output pt_code_t  code     // 2-bit output code
);
  timeunit 1ps; timeprecision 1ps;

  logic [2:0] therm;

  always_comb begin
    therm[0] = (vin_mv > TH0_MV);
    therm[1] = (vin_mv > TH1_MV);
    therm[2] = (vin_mv > TH2_MV);
    code     = 2'(therm[0]) + 2'(therm[1]) + 2'(therm[2]);
  end

endmodule
