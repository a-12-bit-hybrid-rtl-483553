// diff_delay_cell: behavioural model of the differential delay cell.
// Not synthesizable: the real part is a transistor circuit.
//
// Two voltage-controlled delay elements carry the true and the complement
// signal; two minimum-size inverters connected head to tail between the
// two outputs keep them in opposite phase. In the model the latch appears
// as a rule: each output is driven by its own element, and a cell whose
// inputs are complementary gives complementary outputs one delay later.
// The cell is non-inverting. SCALE sets the cell's delay relative to a
// 1X cell: this design uses 8 for the 4X cells, the ratio that spaces the
// coarse taps of the ring evenly (the document does not give it).
//
// Interface: in_p/in_n, out_p/out_n differential pair; vc_mv the global
// control voltage; corner/temp_c the environment of the model; t_ps the
// present delay. Outputs start at out_p = 0, out_n = 1.
module diff_delay_cell
  import hdpwm_pkg::*;
#(
  parameter int SCALE = 1
) (
  input  logic             in_p,
  input  logic             in_n,
  input  logic [VC_W-1:0]  vc_mv,
  input  corner_e          corner,
  input  int               temp_c,
  output logic             out_p,
  output logic             out_n,
  output int               t_ps
);
  timeunit 1ps; timeprecision 1ps;

  int t_n_ps;

  vc_delay_element #(.SCALE(SCALE)) u_p (
    .vin (in_p), .vc_mv (vc_mv), .corner (corner), .temp_c (temp_c),
    .vout (out_p), .t_ps (t_ps)
  );

  vc_delay_element #(.SCALE(SCALE), .INIT(1'b1)) u_n (
    .vin (in_n), .vc_mv (vc_mv), .corner (corner), .temp_c (temp_c),
    .vout (out_n), .t_ps (t_n_ps)
  );

  // the cross-coupled inverters hold the pair in opposite phase
  always @(out_p or out_n) begin
    #1;
    if (in_p != in_n) begin
      assert (out_p != out_n && t_ps == t_n_ps)
        else $error("diff_delay_cell: outputs not complementary");
    end
  end

endmodule
