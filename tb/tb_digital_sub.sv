// tb_digital_sub: checks the thermometer encoder and the subtractor.
// All 64 thermometer codes are combined with random references; a few codes
// with a single bubble check that the encoder counts ones.
`timescale 1ns / 1ps
module tb_digital_sub;
  import dldo_pkg::*;

  logic [NCELLS-1:0] therm;
  code_t             vref, vout_code;
  err_t              err;
  int                checks = 0, failures = 0;

  digital_sub dut (.vout_therm(therm), .vref(vref), .vout_code(vout_code), .err(err));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int n, int r);
    #1;
    checks++;
    if (int'(vout_code) != n || int'(err) != r - n) begin
      failures++;
      $display("FAIL n=%0d vref=%0d: code=%0d err=%0d", n, r, vout_code, err);
    end
  endtask

  initial begin
    int r;
    for (int n = 0; n <= 63; n++) begin
      for (int k = 0; k < 4; k++) begin
        r = (k == 0) ? 0 : (k == 1) ? 63 : int'($urandom_range(63));
        therm = (n == 0) ? '0 : {NCELLS{1'b1}} >> (63 - n);
        vref  = code_t'(r);
        check(n, r);
      end
    end
    // Thermometer codes with one bubble: 20 ones, bit 10 cleared.
    therm = {NCELLS{1'b1}} >> (63 - 21);
    therm[10] = 1'b0;
    vref = code_t'(42);
    check(20, 42);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
