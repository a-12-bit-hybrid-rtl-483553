// tb_pt_lut: exhaustive test of the PT look-up table decoder.
//
// For all sixteen (P1P0, T1T0) pairs it checks that exactly one ladder tap
// is selected and that it is the tap the calibration table assigns: taps
// are numbered from the highest voltage, SS/-40 C = 0 ... ff/125 C = 8;
// code 00 is expected to act like 01.
module tb_pt_lut;
  import hdpwm_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  pt_code_t        p_code, t_code;
  logic [8:0]      tap_sel;
  int checks = 0, failures = 0;

  pt_lut dut (.p_code, .t_code, .tap_sel);

  // calibration table rows: (P, T, tap)
  localparam int ROWS [9][3] = '{
    '{3, 3, 0}, '{3, 2, 1}, '{3, 1, 2},
    '{2, 3, 3}, '{2, 2, 4}, '{2, 1, 5},
    '{1, 3, 6}, '{1, 2, 7}, '{1, 1, 8}};

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 4; p++) begin
      for (int t = 0; t < 4; t++) begin
        int pe, te, exp_tap;
        p_code = 2'(p); t_code = 2'(t);
        #1;
        pe = (p == 0) ? 1 : p;
        te = (t == 0) ? 1 : t;
        exp_tap = -1;
        for (int r = 0; r < 9; r++)
          if (ROWS[r][0] == pe && ROWS[r][1] == te) exp_tap = ROWS[r][2];
        checks++;
        if (tap_sel != (9'b1 << exp_tap)) begin
          failures++;
          $display("FAIL P=%b T=%b sel=%b expected tap %0d", p_code, t_code, tap_sel, exp_tap);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
