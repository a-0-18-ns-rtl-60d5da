// tb_dldo_sweep: the regulator's evaluation sweeps, run on the closed loop at
// default parameters (40 MHz clock, reference code 42, about 0.95 V).
//
//   1. Load capacitance 480..580 pF in 20 pF steps: 20 mA -> 60 mA load step,
//      recovery time reported.
//   2. Load step size 20..45 mA in 5 mA steps from a 20 mA base, C_L = 500 pF.
//   3. Static load 20..100 mA in 20 mA steps at V_IN = 1.0 V.
//   4. Supply 1.0..1.2 V in 50 mV steps, each from a settled start at 100 mA.
//
// For every point the loop must reach zero error (held for 4 cycles) within
// 40 cycles. Points 1, 2 and 3 also require V_OUT within 0.94..0.98 V. The
// supply sweep reports whether the loop settles, and counts a failure only
// for 1.0 V and 1.05 V; at higher supply one PMOS cell moves V_OUT by about
// one TDC code, and with the small-error integral gain of 4 the loop is
// expected to limit-cycle (see the README).
`timescale 1ns / 1ps
module tb_dldo_sweep;
  import dldo_pkg::*;

  localparam real DT_NS = 0.02;

  logic              clk = 1'b0, rst_n = 1'b0;
  code_t             vref = code_t'(42);
  real               vin = 1.0, vout = 0.0, i_pmos, i_src = 0.020, c_l = 500.0e-12;
  logic [NCELLS-1:0] vout_therm, u;
  code_t             u_count, vout_code, err_mag;
  err_t              err;
  state_e            state;
  logic [13:0]       acc;
  int                checks = 0, failures = 0;

  always #12.5 clk = ~clk;

  dldo_top dut (
    .clk(clk), .rst_n(rst_n), .vref(vref), .vin(vin), .vout(vout),
    .i_pmos(i_pmos), .vout_therm(vout_therm), .u(u), .u_count(u_count),
    .vout_code(vout_code), .err(err), .state(state), .err_mag(err_mag),
    .acc(acc)
  );

  initial forever begin
    #(DT_NS);
    vout = vout + (i_pmos - i_src) * DT_NS * 1.0e-9 / c_l;
    if (vout < 0.0) vout = 0.0;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cycles until the error has been zero for 4 cycles (-1 if not in 40).
  task automatic settle(output int took);
    int quiet;
    quiet = 0;
    took = 0;
    while (quiet < 4 && took < 40) begin
      @(negedge clk);
      took++;
      quiet = (err == '0) ? quiet + 1 : 0;
    end
    took = (quiet < 4) ? -1 : took - 4;
  endtask

  task automatic load_edge(real to);
    real from;
    from = i_src;
    for (int k = 1; k <= 50; k++) begin
      #(DT_NS);
      i_src = from + (to - from) * real'(k) / 50.0;
    end
  endtask

  task automatic expect_ok(string what, int took, bit check_v);
    checks++;
    if (took < 0 || (check_v && (vout < 0.94 || vout > 0.98))) begin
      failures++;
      $display("FAIL %s: took %0d cycles, V_OUT %f V", what, took, vout);
    end else
      $display("%s: recovered in %0d ns, V_OUT %f V", what, took * 25, vout);
  endtask

  // Restart from reset at the given load and supply, and settle.
  task automatic restart(real load, real supply);
    int took;
    rst_n = 1'b0;
    i_src = load;
    vin = supply;
    vout = 0.0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    settle(took);
    repeat (5) @(negedge clk);
  endtask

  initial begin
    int took;
    string s;

    // 1. Load capacitance.
    for (int c = 480; c <= 580; c += 20) begin
      c_l = real'(c) * 1.0e-12;
      restart(0.020, 1.0);
      @(posedge clk) #3;
      load_edge(0.060);
      settle(took);
      s = $sformatf("C_L %0d pF, 40 mA step", c);
      expect_ok(s, took, 1'b1);
    end
    c_l = 500.0e-12;

    // 2. Load step size.
    for (int d = 20; d <= 45; d += 5) begin
      restart(0.020, 1.0);
      @(posedge clk) #3;
      load_edge(0.020 + real'(d) * 1.0e-3);
      settle(took);
      s = $sformatf("load step %0d mA", d);
      expect_ok(s, took, 1'b1);
    end

    // 3. Static load.
    for (int l = 20; l <= 100; l += 20) begin
      restart(real'(l) * 1.0e-3, 1.0);
      settle(took);
      s = $sformatf("static load %0d mA, cells on %0d", l, u_count);
      expect_ok(s, took, 1'b1);
    end

    // 4. Supply, at 100 mA.
    for (int v = 1000; v <= 1200; v += 50) begin
      restart(0.100, 1.0);
      vin = real'(v) * 1.0e-3;
      settle(took);
      s = $sformatf("supply %0d mV at 100 mA", v);
      if (v <= 1050) expect_ok(s, took, 1'b1);
      else $display("%s: %s", s, (took < 0) ? "does not settle (limit cycle)" :
                    $sformatf("recovered in %0d ns, V_OUT %f V", took * 25, vout));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
