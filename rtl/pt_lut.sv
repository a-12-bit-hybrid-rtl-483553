// pt_lut: process/temperature look-up table of the Vc calibration.
//
// The process code P1P0 and the temperature code T1T0 from the two 2-bit
// flash ADCs steer a switch matrix that connects exactly one of nine
// resistor-ladder taps to the Vc buffer. This module is the logic of that
// matrix: it decodes the two codes into a one-hot tap select.
//
// Tap order (from the highest ladder voltage down) follows the calibration
// table: tap = 3 * row(P) + col(T), with row 0/1/2 for P = 11 (SS) / 10 (tt)
// / 01 (ff) and col 0/1/2 for T = 11 (-40 C) / 10 (25 C) / 01 (125 C).
// The ADCs never produce code 00 at the characterised points; this design
// treats 00 like 01 (fastest corner, hottest temperature) so that a tap is
// always connected. Purely combinational.
module pt_lut
  import hdpwm_pkg::*;
(
  input  pt_code_t         p_code,  // P1P0
  input  pt_code_t         t_code,  // T1T0
  output logic [N_VC-1:0]  tap_sel  // one-hot ladder tap select
);
  timeunit 1ps; timeprecision 1ps;

  logic [1:0] row;
  logic [1:0] col;

  // code to row/column: 11 -> 0, 10 -> 1, 01 and 00 -> 2
  function automatic logic [1:0] code_index(input pt_code_t c);
    unique case (c)
      2'b11:   return 2'd0;
      2'b10:   return 2'd1;
      default: return 2'd2;
    endcase
  endfunction

  always_comb begin
    row     = code_index(p_code);
    col     = code_index(t_code);
    tap_sel = '0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        if (row == 2'(r) && col == 2'(c)) tap_sel[3*r + c] = 1'b1;
  end

endmodule
