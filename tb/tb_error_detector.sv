// tb_error_detector: exhaustive check of the error-range classification.
// Every error from -63 to +63 is applied; the magnitude and State[1:0] are
// compared with thresholds 32, 8 and 1 worked out in the testbench.
`timescale 1ns / 1ps
module tb_error_detector;
  import dldo_pkg::*;

  err_t   err;
  code_t  err_mag;
  state_e state;
  int     checks = 0, failures = 0;

  error_detector dut (.err(err), .err_mag(err_mag), .state(state));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, exp_st;
    for (int e = -63; e <= 63; e++) begin
      err = err_t'(e);
      #1;
      m = (e < 0) ? -e : e;
      exp_st = (m >= 32) ? 3 : (m >= 8) ? 2 : (m >= 1) ? 1 : 0;
      checks++;
      if (int'(err_mag) != m) begin
        failures++;
        $display("FAIL err=%0d mag=%0d expected %0d", e, err_mag, m);
      end
      checks++;
      if (int'(state) != exp_st) begin
        failures++;
        $display("FAIL err=%0d state=%0d expected %0d", e, state, exp_st);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
