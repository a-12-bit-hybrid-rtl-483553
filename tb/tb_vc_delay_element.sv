// tb_vc_delay_element: test of the voltage-controlled delay element model.
//
// For a set of (corner, temperature, Vc) points it toggles the input and
// measures when the output follows, and compares the delay with
// 20 ps + S * 20 ps V^2 / Vc^2, S = 4 * Vc_cal^2 worked out here from the
// calibration voltage of the corner and temperature. It also checks that
// the element does not invert, that a higher Vc shortens the delay and that
// SCALE multiplies it.
module tb_vc_delay_element;
  import hdpwm_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  logic       vin;
  logic [9:0] vc_mv;
  corner_e    corner;
  int         temp_c, t_ps, t4_ps;
  logic       vout, vout4;
  int checks = 0, failures = 0;

  vc_delay_element dut (.vin, .vc_mv, .corner, .temp_c, .vout, .t_ps);
  vc_delay_element #(.SCALE(8)) dut8 (.vin, .vc_mv, .corner, .temp_c, .vout(vout4), .t_ps(t4_ps));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: corner=%0d T=%0d vc=%0d t=%0d", what, corner, temp_c, vc_mv, t_ps); end
  endtask

  task automatic measure(input corner_e c, input int t, input int v, input real vcal);
    longint t0, t_out, t_out4;
    real e;
    int  e_ps;
    corner = c; temp_c = t; vc_mv = 10'(v);
    #20000;
    t0 = $time;
    vin = ~vin;
    fork
      begin @(vout);  t_out  = $time - t0; end
      begin @(vout4); t_out4 = $time - t0; end
    join
    e    = 20.0 + 4.0 * vcal * vcal * 20.0 / ((v / 1000.0) * (v / 1000.0));
    e_ps = int'(e);
    check(t_out >= e_ps - 1 && t_out <= e_ps + 1, "delay law");
    check(t_out == t_ps, "reported delay");
    check(t_out4 == 8 * t_out, "SCALE multiplies the delay");
    check(vout == vin && vout4 == vin, "non-inverting");
  endtask

  initial begin
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int slow, fast;
    vin = 1'b0; vc_mv = 10'd500; corner = CORNER_TT; temp_c = 25;
    measure(CORNER_TT,  25, 500, 0.500);
    measure(CORNER_TT,  25, 500, 0.500);
    measure(CORNER_SS, -40, 620, 0.620);
    measure(CORNER_SS, 125, 602, 0.602);
    measure(CORNER_FF,  25, 385, 0.385);
    measure(CORNER_FF, 125, 370, 0.370);
    measure(CORNER_TT, -40, 510, 0.510);
    measure(CORNER_TT,  25, 400, 0.500);
    slow = t_ps;
    measure(CORNER_TT,  25, 700, 0.500);
    fast = t_ps;
    check(fast < slow, "higher Vc is faster");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
