// tb_flash_adc2: test of the 2-bit flash ADC model.
//
// Sweeps the input from 0 to 1000 mV in 1 mV steps and compares the code
// with the count of thresholds exceeded; then converts the characterised
// temperature-monitor voltages (all corners) and checks the codes 11 / 10 /
// 01 for -40 / 25 / 125 C.
module tb_flash_adc2;
  import hdpwm_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  int       vin_mv;
  pt_code_t code;
  int checks = 0, failures = 0;

  flash_adc2 #(.TH0_MV(530), .TH1_MV(640), .TH2_MV(740)) dut (.vin_mv, .code);

  localparam int TV [3][3] = '{'{769, 775, 780}, '{693, 700, 706}, '{575, 585, 593}};
  localparam int TC [3]    = '{3, 2, 1};

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v <= 1000; v++) begin
      int e;
      vin_mv = v;
      #1;
      e = (v > 740) ? 3 : (v > 640) ? 2 : (v > 530) ? 1 : 0;
      checks++;
      if (code != 2'(e)) begin
        failures++;
        $display("FAIL vin=%0d code=%b expected %0d", v, code, e);
      end
    end
    for (int t = 0; t < 3; t++)
      for (int c = 0; c < 3; c++) begin
        vin_mv = TV[t][c];
        #1;
        checks++;
        if (code != 2'(TC[t])) begin
          failures++;
          $display("FAIL monitor %0d mV gives %b", vin_mv, code);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
