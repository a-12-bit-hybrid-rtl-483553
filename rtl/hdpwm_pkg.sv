// hdpwm_pkg: widths, code types and the process-corner type shared by the
// hybrid DPWM logic, the calibration look-up table and the analog models.
//
// The duty word is 12 bits: d[2:0] picks one of eight fine taps L0..L7 of
// the ring oscillator, d[5:3] one of eight coarse taps M0..M7, and d[11:6]
// is counted in whole ring periods by a 6-bit counter. The monitor codes
// are 2 bits each; only 01, 10 and 11 are produced for the three
// characterised corners or temperatures, and the look-up table drives one
// of nine ladder taps.
package hdpwm_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned D_W     = 12;  // duty word width
  localparam int unsigned FINE_W  = 3;   // d[2:0]  -> L tap
  localparam int unsigned MID_W   = 3;   // d[5:3]  -> M tap
  localparam int unsigned CNT_W   = 6;   // d[11:6] -> ring periods
  localparam int unsigned N_TAP   = 8;   // taps per multiplexer
  localparam int unsigned N_VC    = 9;   // ladder taps (3 corners x 3 temps)
  localparam int unsigned VC_W    = 10;  // control voltage in mV

  typedef logic [1:0] pt_code_t;          // P1P0 or T1T0
  typedef logic [D_W-1:0] duty_t;

  // Process corner, used only by the behavioural models of the analog parts.
  typedef enum logic [1:0] {
    CORNER_SS = 2'd0,
    CORNER_TT = 2'd1,
    CORNER_FF = 2'd2
  } corner_e;

endpackage
