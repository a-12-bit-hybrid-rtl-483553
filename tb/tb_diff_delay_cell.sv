// tb_diff_delay_cell: test of the differential delay cell model.
//
// Drives a complementary input pair through a 1X cell and a 4X cell (SCALE
// 8) at several control voltages and checks that both outputs follow one
// cell delay later, stay complementary, and that the 4X cell takes eight
// times as long; the delay itself is compared with the delay law at the
// nominal corner.
module tb_diff_delay_cell;
  import hdpwm_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  logic       in_p, in_n;
  logic [9:0] vc_mv;
  corner_e    corner;
  int         temp_c, t1, t4;
  logic       o1p, o1n, o4p, o4n;
  int checks = 0, failures = 0;

  diff_delay_cell            c1 (.in_p, .in_n, .vc_mv, .corner, .temp_c, .out_p(o1p), .out_n(o1n), .t_ps(t1));
  diff_delay_cell #(.SCALE(8)) c4 (.in_p, .in_n, .vc_mv, .corner, .temp_c, .out_p(o4p), .out_n(o4n), .t_ps(t4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: vc=%0d t1=%0d t4=%0d", what, vc_mv, t1, t4); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vs [4] = '{500, 450, 550, 620};
    longint t0, d1p, d1n, d4p;
    in_p = 1'b0; in_n = 1'b1; corner = CORNER_TT; temp_c = 25; vc_mv = 10'd500;
    #20000;
    check(o1p == 1'b0 && o1n == 1'b1 && o4p == 1'b0 && o4n == 1'b1, "initial state");
    foreach (vs[i]) begin
      for (int e = 0; e < 2; e++) begin
        real exp_t;
        vc_mv = 10'(vs[i]);
        #20000;
        t0 = $time;
        in_p = ~in_p; in_n = ~in_n;
        fork
          begin @(o1p); d1p = $time - t0; end
          begin @(o1n); d1n = $time - t0; end
          begin @(o4p); d4p = $time - t0; end
        join
        #1;
        exp_t = 20.0 + 20.0 / ((vs[i] / 1000.0) * (vs[i] / 1000.0));
        check(d1p == d1n, "both sides switch together");
        check(d1p >= longint'(exp_t) - 1 && d1p <= longint'(exp_t) + 1, "1X delay law");
        check(d4p == 8 * d1p, "4X cell is eight 1X delays");
        check(o1p == in_p && o1n == in_n && o1p != o1n, "non-inverting, complementary");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
