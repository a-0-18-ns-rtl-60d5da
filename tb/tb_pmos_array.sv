// tb_pmos_array: applies gate codes with 0..63 cells on and several supply
// and output voltages, and compares the current with n * 31.75 mS * (V_IN -
// V_OUT), or zero when V_OUT is not below V_IN.
`timescale 1ns / 1ps
module tb_pmos_array;

  logic [62:0] u;
  real         vin, vout, i_out;
  int          checks = 0, failures = 0;

  pmos_array dut (.u(u), .vin(vin), .vout(vout), .i_out(i_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real exp_i, err;
    int n;
    for (int k = 0; k < 200; k++) begin
      n = (k < 64) ? k : int'($urandom_range(63));
      u = '0;
      // Any n cells on; the cell positions do not matter.
      for (int c = 0, placed = 0; placed < n; c = (c + 2) % 63) begin
        if (!u[c]) begin u[c] = 1'b1; placed++; end
      end
      vin  = 1.0 + 0.2 * real'($urandom_range(10)) / 10.0;
      vout = 0.9 + 0.4 * real'($urandom_range(100)) / 100.0;
      #1;
      exp_i = (vin > vout) ? real'(n) * (0.1 / (63.0 * 0.05)) * (vin - vout) : 0.0;
      err = i_out - exp_i;
      checks++;
      if (err > 1.0e-4 || err < -1.0e-4) begin
        failures++;
        $display("FAIL n=%0d vin=%f vout=%f i=%f expected %f", n, vin, vout, i_out, exp_i);
      end
    end
    // Full array at the design's operating point: 100 mA.
    u = '1; vin = 1.0; vout = 0.95;
    #1;
    checks++;
    if (i_out < 0.0999 || i_out > 0.1001) begin
      failures++;
      $display("FAIL full array current %f", i_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
