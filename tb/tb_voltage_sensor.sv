// tb_voltage_sensor: measures the interval from the rising clock edge to the
// rising edge of OUT for a range of voltages and compares it with
// 1.85 ns + 450 fF * V / 100 uA (4.5 ns per volt), within 2 ps. Also checks
// that OUT falls in the pre-charge phase and that long intervals are clamped.
`timescale 1ns / 1ps
module tb_voltage_sensor;

  logic clk = 1'b0;
  real  vout = 0.0;
  logic out;
  int   checks = 0, failures = 0;

  voltage_sensor dut (.clk(clk), .vout(vout), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t0, dt, exp_dt;
    real volts[8] = '{0.0, 0.2, 0.5, 0.9, 0.95, 1.0, 1.2, 3.0};
    #5;
    foreach (volts[k]) begin
      vout = volts[k];
      #7.5 clk = 1'b1;
      t0 = $realtime;
      @(posedge out);
      dt = $realtime - t0;
      exp_dt = 1.85 + 450.0e-15 * volts[k] / 100.0e-6 * 1.0e9;
      if (exp_dt > 12.0) exp_dt = 12.0;
      checks++;
      if (dt < exp_dt - 0.002 || dt > exp_dt + 0.002) begin
        failures++;
        $display("FAIL v=%f dt=%f expected %f", volts[k], dt, exp_dt);
      end
      #(12.5 - dt) clk = 1'b0;
      #0.5;
      checks++;
      if (out !== 1'b0) begin
        failures++;
        $display("FAIL OUT not cleared in pre-charge phase");
      end
      #4.5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
