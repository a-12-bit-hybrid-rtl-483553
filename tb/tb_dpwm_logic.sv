// tb_dpwm_logic: self-checking test of the DPWM logic with ideal ring taps.
//
// The testbench generates the sixteen tap waveforms itself from a phase
// counter (one step = one fine delay T1, ring period 64 * T1): Lk rises at
// step 8-k, Mj at step 8+8j, each high for 32 steps. For a set of duty
// words (corners 0, 1, 63, 64, 4095, all d[5:0] == 0 cases near the ends,
// and random values) it holds d for four switching periods and checks, over
// the last two, the number of pulses, the pulse width d * T1 and the
// switching period 4096 * T1. It also checks that a new d is not used
// before the next switching period.
module tb_dpwm_logic;
  import hdpwm_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int T1  = 10;          // fine step, ps
  localparam int TSW = 4096 * T1;   // switching period

  logic             rst_n;
  logic [7:0]       tap_l, tap_m;
  duty_t            d, d_act;
  logic             dpwm, period_end;
  logic [5:0]       cnt;

  int checks = 0, failures = 0;
  int ph = 0;
  longint last_rise = -1, last_width = -1, last_period = -1;
  int n_rise = 0, n_fall = 0;

  dpwm_logic dut (
    .rst_n, .tap_l, .tap_m, .d, .dpwm, .d_act, .cnt, .period_end
  );

  function automatic logic tap_at(input int p, input int r);
    return (((p - r) % 64 + 64) % 64) < 32;
  endfunction

  // ideal ring: one phase step per T1
  initial begin
    tap_l = '0; tap_m = '0;
    forever begin
      #(T1);
      ph = (ph + 1) % 64;
      for (int k = 0; k < 8; k++) tap_l[k] = tap_at(ph, 8 - k);
      for (int j = 0; j < 8; j++) tap_m[j] = tap_at(ph, 8 + 8 * j);
    end
  end

  always @(posedge dpwm) begin
    if (last_rise >= 0) last_period = $time - last_rise;
    last_rise = $time;
    n_rise++;
  end
  always @(negedge dpwm) begin
    last_width = $time - last_rise;
    n_fall++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (d=%0d width=%0d period=%0d rises=%0d)", what, d, last_width,
               last_period, n_rise);
    end
  endtask

  task automatic run_duty(input int dv);
    d = 12'(dv);
    #(2 * TSW);
    n_rise = 0; n_fall = 0;
    #(2 * TSW);
    if (dv == 0) begin
      check(n_rise == 0 && dpwm == 1'b0, "d=0 gives no pulse");
    end else begin
      check(n_rise == 2 && n_fall == 2, "two pulses in two periods");
      check(last_width == longint'(dv) * T1, "pulse width = d*T1");
      check(last_period == longint'(TSW), "switching period = 4096*T1");
    end
  endtask

  // watchdog
  initial begin
    #(400 * TSW);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int list[$] = '{1, 2, 7, 8, 9, 63, 64, 65, 128, 2048, 2049, 4032, 4033, 4094, 4095,
                    0, 4088, 4087, 56, 57, 3000, 512};
    rst_n = 1'b0;
    d     = '0;
    #(5 * T1 + 3);
    rst_n = 1'b1;
    foreach (list[i]) run_duty(list[i]);
    for (int i = 0; i < 20; i++) run_duty(int'($urandom_range(1, 4095)));

    // latency: a new d must not change the pulse that is already running
    d = 12'd1000;
    #(2 * TSW);
    @(posedge dpwm);
    #(T1);
    d = 12'd3000;
    @(negedge dpwm);
    #1;
    check(last_width == 1000 * T1, "pulse in progress keeps the old d");
    @(negedge dpwm);
    #1;
    check(last_width == 3000 * T1, "next period uses the new d");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
