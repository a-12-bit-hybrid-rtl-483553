// hdpwm_top: 12-bit hybrid digital pulse-width modulator with process and
// temperature (PT) calibration.
//
// A differential ring oscillator of eight 1X and three 4X delay cells
// provides sixteen phases of its period Td; the DPWM logic builds each
// pulse from a fine start phase (d[2:0]), a coarse end phase (d[5:3]) and a
// count of whole ring periods (d[11:6]). The switching period is 64 ring
// periods, so no clock faster than the ring is needed. Because the cell
// delay drifts with process and temperature, a calibration path sets the
// cells' control voltage Vc: a process monitor and a temperature monitor
// feed two 2-bit flash ADCs, and their codes P1P0 / T1T0 pick one of nine
// resistor-ladder voltages through a look-up table and a buffer.
//
// dpwm_logic and pt_lut are synthesizable; ring_osc, the two monitors, the
// ADCs and vc_ladder are behavioural models of analog circuits, so corner
// and temp_c are environment inputs for those models only. Timing: the
// pulse width is d * Td/64 and the period 4096 * Td/64; a new d acts from
// the next switching period; Vc follows a PT change after the ladder
// buffer's settling time.
module hdpwm_top
  import hdpwm_pkg::*;
(
  input  logic              rst_n,    // DPWM logic reset, active low
  input  logic              osc_en,   // ring oscillator enable
  input  corner_e           corner,   // environment: process corner
  input  int                temp_c,   // environment: temperature in degC
  input  duty_t             d,        // duty command d[11:0]
  output logic              dpwm,     // modulated output
  output pt_code_t          p_code,   // process code P1P0
  output pt_code_t          t_code,   // temperature code T1T0
  output logic [VC_W-1:0]   vc_mv,    // control voltage Vc (mV)
  output logic [N_TAP-1:0]  tap_l,    // ring taps L0..L7
  output logic [N_TAP-1:0]  tap_m,    // ring taps M0..M7
  output duty_t             d_act,    // duty in use this period
  output logic              period_end, // counter in its last ring period
  output logic [CNT_W-1:0]  cnt,      // ring-period counter
  output int                t1_ps     // present 1X cell delay (model observation)
);
  timeunit 1ps; timeprecision 1ps;

  int               v_temp_mv;
  int               v_proc_mv;
  logic [N_VC-1:0]  tap_sel;

  // PT calibration
  temp_monitor u_temp_mon (
    .corner (corner), .temp_c (temp_c), .vout_mv (v_temp_mv)
  );

  process_monitor u_proc_mon (
    .corner (corner), .temp_c (temp_c), .vout_mv (v_proc_mv)
  );

  flash_adc2 #(.TH0_MV(530), .TH1_MV(640), .TH2_MV(740)) u_adc_t (
    .vin_mv (v_temp_mv), .code (t_code)
  );

  flash_adc2 #(.TH0_MV(560), .TH1_MV(660), .TH2_MV(750)) u_adc_p (
    .vin_mv (v_proc_mv), .code (p_code)
  );

  pt_lut u_lut (
    .p_code (p_code), .t_code (t_code), .tap_sel (tap_sel)
  );

  vc_ladder u_ladder (
    .tap_sel (tap_sel), .vc_mv (vc_mv)
  );

  // delay line
  ring_osc u_ring (
    .en (osc_en), .vc_mv (vc_mv), .corner (corner), .temp_c (temp_c),
    .tap_l (tap_l), .tap_m (tap_m), .t1_ps (t1_ps)
  );

  // ring-mux / counter-comparator DPWM
  dpwm_logic u_dpwm (
    .rst_n (rst_n), .tap_l (tap_l), .tap_m (tap_m), .d (d),
    .dpwm (dpwm), .d_act (d_act), .cnt (cnt), .period_end (period_end)
  );

endmodule
