// ring_osc: behavioural model of the differential tapped delay-line ring
// oscillator. Not synthesizable: it is built from the behavioural delay
// cell model.
//
// Structure: eight 1X differential cells followed by three 4X cells, all
// non-inverting, the loop closed with the differential pair crossed, so one
// trip of a transition round the ring is half the period Td. Stage outputs
// p[1..11] (true side); the ring input is p[0] = ~p[11]. Taps: L7..L0 are
// p[1]..p[8] (rising one 1X delay t1 apart, L7 first), M0..M3 are
// p[8]..p[11] and M4..M7 the complements ~p[8]..~p[11] (M7 = p[0]). With a
// 4X delay of RATIO_4X = 8 times t1 the M taps are Td/8 apart and the
// L taps Td/64 apart, Td = 64 * t1. All cells share the control voltage Vc.
//
// en low forces the ring input low (the start-up state, every stage low
// once the ring has drained); the first transition enters when en rises.
// The document shows no enable; it is this design's own.
module ring_osc
  import hdpwm_pkg::*;
#(
  parameter int RATIO_4X = 8       // 4X cell delay / 1X cell delay
) (
  input  logic             en,      // oscillator enable
  input  logic [VC_W-1:0]  vc_mv,   // control voltage Vc in mV
  input  corner_e          corner,  // environment: process corner
  input  int               temp_c,  // environment: temperature in degC
  output logic [N_TAP-1:0] tap_l,   // L0..L7
  output logic [N_TAP-1:0] tap_m,   // M0..M7
  output int               t1_ps    // present 1X cell delay (for observation)
);
  timeunit 1ps; timeprecision 1ps;

  localparam int N_1X = 8;
  localparam int N_4X = 3;
  localparam int N_ST = N_1X + N_4X;

  logic [N_ST:0] p;   // true side, p[0] is the ring input
  logic [N_ST:0] n;   // complement side
  int            t_ps [1:N_ST];

  // crossed loop closure, gated by en
  assign p[0] = en & n[N_ST];
  assign n[0] = ~p[0];

  for (genvar i = 1; i <= N_ST; i++) begin : g_cell
    diff_delay_cell #(.SCALE((i <= N_1X) ? 1 : RATIO_4X)) u_cell (
      .in_p (p[i-1]), .in_n (n[i-1]), .vc_mv (vc_mv), .corner (corner),
      .temp_c (temp_c), .out_p (p[i]), .out_n (n[i]), .t_ps (t_ps[i])
    );
  end

  assign t1_ps = t_ps[1];

  always_comb begin
    for (int k = 0; k < N_TAP; k++) tap_l[k] = p[N_1X - k];
    for (int j = 0; j < 4; j++) begin
      tap_m[j]     = p[N_1X + j];
      tap_m[j + 4] = n[N_1X + j];
    end
  end

endmodule
