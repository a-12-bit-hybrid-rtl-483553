// tb_hdpwm_top: end-to-end test of the calibrated 12-bit hybrid DPWM, with
// the top at its default parameters.
//
// For each of the nine characterised process/temperature points it checks:
// the monitor codes P1P0 / T1T0, the calibrated Vc, and the ring period Td
// against its nominal 6.4 ns (1 % tolerance). At each point it then runs
// duty words and checks every measured pulse width against d * Td / 64 and
// the switching period against 64 * Td, with Td measured on the M7 tap.
// Mechanisms that must each occur at least once: all nine calibration
// taps, a temperature change while running (recalibration), d = 0 (no
// pulse), d = 4095 (maximum pulse), an end edge on the counter's own clock
// edge (d[5:0] = 0), and a duty change taking effect only in the next
// switching period.
module tb_hdpwm_top;
  import hdpwm_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int TD_NOM = 6400;

  logic       rst_n, osc_en, dpwm, period_end;
  corner_e    corner;
  int         temp_c, t1_ps;
  duty_t      d, d_act;
  pt_code_t   p_code, t_code;
  logic [9:0] vc_mv;
  logic [7:0] tap_l, tap_m;
  logic [5:0] cnt;

  hdpwm_top dut (
    .rst_n, .osc_en, .corner, .temp_c, .d, .dpwm, .p_code, .t_code, .vc_mv,
    .tap_l, .tap_m, .d_act, .period_end, .cnt, .t1_ps
  );

  int checks = 0, failures = 0;
  int n_tap [9];
  int n_recal = 0, n_zero = 0, n_full = 0, n_coinc = 0, n_update = 0;

  longint last_rise = -1, last_width = -1, last_period = -1, last_m7 = -1, td = -1;
  int n_rise = 0;

  always @(posedge tap_m[7]) begin
    if (last_m7 >= 0) td = $time - last_m7;
    last_m7 = $time;
  end
  always @(posedge dpwm) begin
    if (last_rise >= 0) last_period = $time - last_rise;
    last_rise = $time;
    n_rise++;
  end
  always @(negedge dpwm) last_width = $time - last_rise;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: corner=%0d T=%0d P=%b T=%b vc=%0d td=%0d d=%0d w=%0d per=%0d",
               what, corner, temp_c, p_code, t_code, vc_mv, td, d, last_width, last_period);
    end
  endtask

  function automatic int exp_vc(input int c, input int t);
    // rows SS, tt, ff; columns -40, 25, 125 C
    int v [3][3] = '{'{620, 610, 602}, '{510, 500, 480}, '{400, 385, 370}};
    return v[c][t];
  endfunction

  task automatic wait_periods(input int n);
    repeat (n) @(posedge period_end);
  endtask

  task automatic run_duty(input int dv);
    d = 12'(dv);
    wait_periods(2);
    n_rise = 0;
    wait_periods(2);
    #1;
    if (dv == 0) begin
      check(n_rise == 0 && !dpwm, "d=0 gives no pulse");
      n_zero++;
    end else begin
      check(n_rise == 2, "one pulse per switching period");
      check(last_width == longint'(dv) * td / 64, "width = d * Td / 64");
      check(last_period == 64 * td, "switching period = 64 * Td");
      if (dv == 4095) n_full++;
      if (dv % 64 == 0) n_coinc++;
    end
  endtask

  initial begin
    #(3000 * 1000 * 1000);  // 3 ms
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int temps [3] = '{-40, 25, 125};
    static corner_e cs [3] = '{CORNER_SS, CORNER_TT, CORNER_FF};
    static int exp_code [3] = '{3, 2, 1};
    rst_n = 1'b0; osc_en = 1'b0; d = '0; corner = CORNER_TT; temp_c = 25;

    for (int c = 0; c < 3; c++) begin
      for (int t = 0; t < 3; t++) begin
        rst_n = 1'b0; osc_en = 1'b0;
        corner = cs[c]; temp_c = temps[t];
        #5000;                       // Vc settles with the ring stopped
        osc_en = 1'b1;
        #1000;
        rst_n = 1'b1;
        check(p_code == 2'(exp_code[c]), "process code");
        check(t_code == 2'(exp_code[t]), "temperature code");
        check(int'(vc_mv) == exp_vc(c, t), "calibrated Vc");
        if (int'(vc_mv) == exp_vc(c, t)) n_tap[3 * c + t]++;
        wait_periods(1);
        check(td >= TD_NOM - 64 && td <= TD_NOM + 64, "calibrated Td within 1 %");
        run_duty(int'($urandom_range(1, 4095)));
        run_duty(c * 1365 + t * 455 + 1);
        if (c == 1 && t == 1) begin
          run_duty(0);
          run_duty(4095);
          run_duty(1);
          run_duty(64);
          run_duty(2048);
          // duty change: the running pulse keeps the old width
          d = 12'd1000;
          wait_periods(2);
          @(posedge dpwm);
          #10;
          d = 12'd3000;
          @(negedge dpwm);
          #1;
          check(last_width == 1000 * td / 64, "running pulse keeps the old d");
          @(negedge dpwm);
          #1;
          check(last_width == 3000 * td / 64, "next pulse uses the new d");
          n_update++;
        end
      end
    end

    // temperature step while running: codes, Vc and Td follow
    corner = CORNER_TT; temp_c = 25;
    run_duty(2500);
    temp_c = 125;
    run_duty(2500);
    check(t_code == 2'b01 && vc_mv == 10'd480, "recalibrated Vc after the temperature step");
    check(td >= TD_NOM - 64 && td <= TD_NOM + 64, "Td restored after the temperature step");
    n_recal++;

    for (int i = 0; i < 9; i++) check(n_tap[i] > 0, "every calibration tap used");
    check(n_recal > 0, "recalibration exercised");
    check(n_zero > 0, "d = 0 exercised");
    check(n_full > 0, "d = 4095 exercised");
    check(n_coinc > 0, "end edge on the counter clock edge exercised");
    check(n_update > 0, "duty update exercised");
    $display("mechanisms: recal=%0d zero=%0d full=%0d coinc=%0d update=%0d", n_recal, n_zero,
             n_full, n_coinc, n_update);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
