// dpwm_logic: the digital half of the 12-bit hybrid DPWM.
//
// The ring oscillator provides sixteen phases of its period Td. L7..L0 are
// the outputs of the eight 1X cells and rise one fine step (Td/64) apart,
// L7 first; M0..M7 rise one coarse step (Td/8) apart, with M0 the same node
// as L0 and M7 the ring's own input node (rising at the end of the period).
// Two 8-to-1 multiplexers pick the start tap L[d[2:0]] and the end tap
// M[d[5:3]]. A 6-bit counter, clocked by the selected L tap, counts ring
// periods; the switching period is 64 ring periods. The pulse starts at the
// selected L edge of period 0 and ends at the selected M edge of period
// d[11:6], so its width is exactly d * Td/64 and its period 4096 * Td/64.
//
// Output stage (this design's own choice; the document draws it only as a
// block): two toggle flip-flops, one clocked by the L tap (start) and one by
// the M tap (end); the output is their XOR, so it has no combinational
// glitch. The end flop only toggles while the output is high, which makes
// spurious M-mux edges after the pulse harmless. When d[5:0] == 0 the end
// edge (M0) is the same node as the start-side clock edge (L0), so the end
// flop sees the counter value from before that edge and compares with
// d[11:6]-1. d == 0 gives no pulse at all.
//
// Duty update (own choice): d is taken into the working register on the
// M7 edge that closes counter period 63. At that instant every L tap is low
// (they rise again one fine step later) so the L multiplexer switches
// without creating a clock edge, and any previous pulse has already ended.
// A new d therefore acts from the next switching period on.
//
// Interface: tap_l[k] = Lk, tap_m[j] = Mj, all rising edges significant;
// rst_n is asynchronous and active low.
module dpwm_logic
  import hdpwm_pkg::*;
(
  input  logic              rst_n,
  input  logic [N_TAP-1:0]  tap_l,      // L0..L7
  input  logic [N_TAP-1:0]  tap_m,      // M0..M7
  input  duty_t             d,          // duty command
  output logic              dpwm,       // modulated output
  output duty_t             d_act,      // duty in use this period
  output logic [CNT_W-1:0]  cnt,        // ring-period counter
  output logic              period_end  // high while counter is at its last value
);
  timeunit 1ps; timeprecision 1ps;

  localparam logic [CNT_W-1:0] CNT_LAST = '1;

  logic             clk_l;   // selected start tap
  logic             clk_m;   // selected end tap
  logic             clk_upd; // M7: end of a ring period
  logic             s_tog;   // toggles at each pulse start
  logic             r_tog;   // toggles at each pulse end
  logic [CNT_W-1:0] d_hi;
  logic [CNT_W-1:0] end_cnt; // counter value seen by the end flop

  // 8-to-1 tap multiplexers
  assign clk_l   = tap_l[d_act[FINE_W-1:0]];
  assign clk_m   = tap_m[d_act[FINE_W+MID_W-1:FINE_W]];
  assign clk_upd = tap_m[N_TAP-1];

  assign d_hi       = d_act[D_W-1:D_W-CNT_W];
  assign period_end = (cnt == CNT_LAST);

  // comparator reference: one less when the end edge coincides with the
  // counter's own clock edge
  always_comb begin
    if (d_act[FINE_W+MID_W-1:0] == '0) end_cnt = d_hi - 1'b1;
    else                               end_cnt = d_hi;
  end

  // counter of ring periods, and pulse start
  always_ff @(posedge clk_l or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= CNT_LAST;
      s_tog <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      if (period_end && !dpwm && d_act != '0) s_tog <= ~s_tog;
    end
  end

  // pulse end: comparator match at the selected M edge
  always_ff @(posedge clk_m or negedge rst_n) begin
    if (!rst_n)                        r_tog <= 1'b0;
    else if (dpwm && cnt == end_cnt)   r_tog <= ~r_tog;
  end

  // duty register, loaded at the close of the last counter period
  always_ff @(posedge clk_upd or negedge rst_n) begin
    if (!rst_n)          d_act <= '0;
    else if (period_end) d_act <= d;
  end

  assign dpwm = s_tog ^ r_tog;

endmodule
