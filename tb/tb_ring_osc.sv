// tb_ring_osc: test of the ring oscillator model.
//
// For several (corner, temperature, Vc) settings it measures the rising
// edges of all sixteen taps over one ring period and checks: the order
// L7, L6 ... L0 = M0, M1 ... M7; L taps one 1X delay apart and M taps
// eight 1X delays apart; the ring period Td = 64 * t1; and t1 itself
// against the delay law t1 = 20 ps + S * 20 ps V^2 / Vc^2, with S worked
// out here from the nominal calibration voltage of the corner.
module tb_ring_osc;
  import hdpwm_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  logic       en;
  logic [9:0] vc_mv;
  corner_e    corner;
  int         temp_c, t1_ps;
  logic [7:0] tap_l, tap_m;
  int checks = 0, failures = 0;

  ring_osc dut (.en, .vc_mv, .corner, .temp_c, .tap_l, .tap_m, .t1_ps);

  longint rl [8], rm [8];
  longint td_meas;

  for (genvar k = 0; k < 8; k++) begin : g_mon
    always @(posedge tap_l[k]) rl[k] = $time;
    always @(posedge tap_m[k]) rm[k] = $time;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: corner=%0d T=%0d vc=%0d t1=%0d", what, corner, temp_c, vc_mv, t1_ps); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input corner_e c, input int t, input int v, input real vnom);
    real s, e1;
    int  exp_t1;
    longint t0;
    corner = c; temp_c = t; vc_mv = 10'(v);
    en = 1'b0;
    #100;
    en = 1'b1;
    // let it run, then take one full period starting at L7
    repeat (3) @(posedge tap_m[7]);
    @(posedge tap_l[7]);
    t0 = $time;
    @(posedge tap_m[7]);
    #1;
    for (int k = 7; k > 0; k--)
      check(rl[k-1] - rl[k] == longint'(t1_ps), "L taps one t1 apart");
    check(rm[0] == rl[0], "M0 is L0");
    for (int j = 0; j < 7; j++)
      check(rm[j+1] - rm[j] == 8 * longint'(t1_ps), "M taps 8*t1 apart");
    check(rl[7] == t0 && rm[7] > rm[6], "one period from L7 to M7");
    @(posedge tap_l[7]);
    td_meas = $time - t0;
    #1;
    s      = 4.0 * vnom * vnom;
    e1     = 20.0 + s * 20.0 / ((v / 1000.0) * (v / 1000.0));
    exp_t1 = int'(e1);
    check(t1_ps >= exp_t1 - 1 && t1_ps <= exp_t1 + 1, "t1 follows the delay law");
    check(td_meas == 64 * longint'(t1_ps), "Td = 64 * t1");
  endtask

  initial begin
    en = 1'b0; vc_mv = 10'd500; corner = CORNER_TT; temp_c = 25;
    measure(CORNER_TT,  25, 500, 0.500);
    measure(CORNER_SS,  25, 610, 0.610);
    measure(CORNER_FF, 125, 370, 0.370);
    measure(CORNER_SS, -40, 620, 0.620);
    // uncalibrated: slow corner at the nominal Vc is slower
    measure(CORNER_SS,  25, 500, 0.610);
    check(t1_ps > 130, "slow corner at nominal Vc is slow");
    // higher Vc makes the cell faster
    measure(CORNER_TT,  25, 600, 0.500);
    check(t1_ps < 100, "higher Vc is faster");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
