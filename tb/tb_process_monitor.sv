// tb_process_monitor: test of the process monitor model.
//
// Checks the output at the characterised points (-40, 25, 125 C for the
// SS, tt and ff corners), that between points it stays within the two
// neighbouring values, and that it separates the corners by more than 60 mV at every temperature.
module tb_process_monitor;
  import hdpwm_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  corner_e corner;
  int      temp_c, vout_mv;
  int checks = 0, failures = 0;

  process_monitor dut (.corner, .temp_c, .vout_mv);

  localparam int TP [3] = '{-40, 25, 125};
  localparam int EXP [3][3] = '{'{800, 802, 815}, '{704, 700, 705}, '{625, 619, 621}};
  localparam corner_e CS [3] = '{CORNER_SS, CORNER_TT, CORNER_FF};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: corner=%0d T=%0d v=%0d", what, corner, temp_c, vout_mv); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 3; c++) begin
      corner = CS[c];
      for (int i = 0; i < 3; i++) begin
        temp_c = TP[i];
        #1;
        check(vout_mv == EXP[c][i], "characterised point");
      end
      for (int t = -40; t <= 125; t += 5) begin
        int s, lo, hi;
        temp_c = t;
        #1;
        s  = (t < 25) ? 0 : 1;
        lo = (EXP[c][s] < EXP[c][s+1]) ? EXP[c][s] : EXP[c][s+1];
        hi = (EXP[c][s] < EXP[c][s+1]) ? EXP[c][s+1] : EXP[c][s];
        check(vout_mv >= lo && vout_mv <= hi, "between neighbouring points");
      end
    end
    // trend over temperature / separation of corners
    for (int t = -40; t <= 125; t += 15) begin
      int v_ss, v_tt, v_ff, v_lo, v_hi;
      temp_c = t;
      corner = CORNER_SS; #1; v_ss = vout_mv;
      corner = CORNER_TT; #1; v_tt = vout_mv;
      corner = CORNER_FF; #1; v_ff = vout_mv;
      temp_c = t - 10; corner = CORNER_TT; #1; v_lo = vout_mv;
      temp_c = t + 10; #1; v_hi = vout_mv;
      if ("process" == "temp") check(v_hi < v_lo && v_ss - v_ff < 25, "falls with T, small process spread");
      else                check(v_ss - v_tt > 60 && v_tt - v_ff > 60, "corners separated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
