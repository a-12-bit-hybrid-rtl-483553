// tb_vc_ladder: test of the Vc ladder and buffer model.
//
// Selects each of the nine taps in turn and checks Vc against the
// calibration voltages (620 ... 370 mV) after the buffer settling time,
// that Vc has not yet moved vc_prev it, and that no selection gives 0 mV.
module tb_vc_ladder;
  import hdpwm_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int SETTLE = 1000;
  localparam int EXP_MV [9] = '{620, 610, 602, 510, 500, 480, 400, 385, 370};

  logic [8:0] tap_sel;
  logic [9:0] vc_mv;
  int checks = 0, failures = 0;

  vc_ladder #(.SETTLE_PS(SETTLE)) dut (.tap_sel, .vc_mv);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: sel=%b vc=%0d", what, tap_sel, vc_mv); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] vc_prev;
    tap_sel = '0;
    #(2 * SETTLE);
    for (int i = 0; i < 9; i++) begin
      vc_prev  = vc_mv;
      tap_sel = 9'b1 << i;
      #(SETTLE / 2);
      check(vc_mv == vc_prev, "Vc still settling");
      #(SETTLE);
      check(vc_mv == 10'(EXP_MV[i]), "tap voltage");
    end
    tap_sel = '0;
    #(2 * SETTLE);
    check(vc_mv == 0, "no tap selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
