// tb_tdc: launches a clock edge into the delay line and fires the sample
// edge OUT after a chosen interval dt. The captured thermometer code must
// hold exactly the taps k = 1..63 with k * 0.145 ns < dt, counted here in
// the testbench. Intervals avoid the tap instants by at least 20 ps.
`timescale 1ns / 1ps
module tb_tdc;

  logic        clk = 1'b0, out = 1'b0;
  logic [62:0] therm;
  int          checks = 0, failures = 0;

  tdc dut (.clk(clk), .out(out), .therm(therm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic convert(real dt);
    logic [62:0] exp_t;
    int n;
    n = 0;
    for (int k = 1; k <= 63; k++) if (real'(k) * 0.145 < dt) n++;
    exp_t = '0;
    for (int i = 0; i < n; i++) exp_t[i] = 1'b1;
    clk = 1'b1;
    #(dt) out = 1'b1;
    #1;
    checks++;
    if (therm !== exp_t) begin
      failures++;
      $display("FAIL dt=%f therm=%h expected %h (%0d ones)", dt, therm, exp_t, n);
    end
    #(12.5 - dt - 1.0) clk = 1'b0;
    out = 1'b0;
    #12.5;
  endtask

  initial begin
    #12.5;
    convert(0.1);     // no tap reached
    convert(0.16);    // first tap
    convert(1.85);
    convert(6.125);   // about 0.95 V
    convert(9.0);
    convert(9.2);     // all 63 taps
    for (int k = 0; k < 40; k++)
      convert(0.145 * real'($urandom_range(62)) + 0.02 + 0.1 * real'($urandom_range(1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
