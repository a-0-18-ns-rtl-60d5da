// tb_dldo_top: closed-loop simulation of the whole regulator at its default
// parameters, with the output node modelled in the testbench: a 0.5 nF load
// capacitor and a load current source stepping between 20 mA and 60 mA
// (a 40 mA step) with a 1 ns edge, integrated with 20 ps Euler steps. The
// clock is 40 MHz and the reference code 42 (about 0.95 V).
//
// Sequence: start-up from all cells off at 20 mA, load step up and down by
// 40 mA, a second step up, supply steps from 1.0 V to 1.03 V and back at
// 60 mA,
// reference step down far enough to force the largest error range and the
// lower output clamp, reference step to full scale to reach the upper
// clamp, and return to 0.95 V.
//
// Checked every cycle:
//   * the TDC code equals the count of 0.145 ns taps inside
//     1.85 ns + 4.5 ns/V * V_OUT, V_OUT taken at the previous rising edge;
//   * the cell count after each edge equals the PI reference model applied
//     to the error seen before that edge (one-cycle latency);
// and after each disturbance the loop must return to zero error within
// 40 cycles and V_OUT must sit within 0.94..0.98 V. Each mechanism (the four
// error ranges, hold, both clamps, undershoot and overshoot recovery, line
// step) is counted and must occur at least once.
`timescale 1ns / 1ps
module tb_dldo_top;
  import dldo_pkg::*;
  import pi_ref_pkg::*;

  localparam real C_L   = 0.5e-9;
  localparam real DT_NS = 0.02;

  logic              clk = 1'b0, rst_n = 1'b0;
  code_t             vref = code_t'(42);
  real               vin = 1.0, vout = 0.0, i_pmos, i_src = 0.020;
  logic [NCELLS-1:0] vout_therm, u;
  code_t             u_count, vout_code, err_mag;
  err_t              err;
  state_e            state;
  logic [13:0]       acc;

  int checks = 0, failures = 0, cycles = 0;
  int n_range[4] = '{0, 0, 0, 0};
  int n_hold = 0, n_clamp_hi = 0, n_clamp_lo = 0;
  int n_under = 0, n_over = 0, n_line = 0;
  int m_acc = 0, m_u = 0;
  real v_prev = 0.0, v_min, v_max;

  always #12.5 clk = ~clk;

  dldo_top dut (
    .clk(clk), .rst_n(rst_n), .vref(vref), .vin(vin), .vout(vout),
    .i_pmos(i_pmos), .vout_therm(vout_therm), .u(u), .u_count(u_count),
    .vout_code(vout_code), .err(err), .state(state), .err_mag(err_mag),
    .acc(acc)
  );

  // Output node: C_L dV/dt = i_pmos - i_load.
  initial forever begin
    #(DT_NS);
    vout = vout + (i_pmos - i_src) * DT_NS * 1.0e-9 / C_L;
    if (vout < 0.0) vout = 0.0;
    if (vout < v_min) v_min = vout;
    if (vout > v_max) v_max = vout;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tdc_expect(real v, output bit near_tie);
    real dt;
    int n;
    dt = 1.85 + 4.5 * v;
    if (dt > 12.0) dt = 12.0;
    n = 0;
    near_tie = 1'b0;
    for (int k = 1; k <= 63; k++) begin
      if (real'(k) * 0.145 < dt) n++;
      if (real'(k) * 0.145 - dt < 0.002 && dt - real'(k) * 0.145 < 0.002) near_tie = 1'b1;
    end
    return n;
  endfunction

  // Per-cycle checks, just before each rising edge and just after it.
  always @(posedge clk) if (rst_n) begin
    int e, n_exp;
    bit tie;
    e = int'(err);
    cycles++;
    // TDC code from the voltage sampled at the previous edge.
    n_exp = tdc_expect(v_prev, tie);
    if (!tie && cycles > 1) begin
      checks++;
      if (int'(vout_code) != n_exp) begin
        failures++;
        $display("FAIL t=%0t TDC code %0d, expected %0d for %f V", $time, vout_code, n_exp, v_prev);
      end
    end
    v_prev = vout;
    n_range[range_of(e)]++;
    if (e == 0) n_hold++;
    step(m_acc, m_u, e);
    #1;
    checks++;
    if (int'(u_count) != m_u || int'(acc) != m_acc) begin
      failures++;
      $display("FAIL t=%0t cells %0d acc %0d, expected %0d %0d", $time, u_count, acc, m_u, m_acc);
    end
    if ($test$plusargs("trace")) $display("%0t v=%f code=%0d err=%0d st=%0d u=%0d acc=%0d", $time, v_prev, vout_code, e, state, u_count, acc);
    if (m_u == 63 && e > 0) n_clamp_hi++;
    if (m_u == 0 && e < 0) n_clamp_lo++;
  end

  // Waits until the error has been zero for 4 cycles; returns cycles taken.
  task automatic settle(string what, output int took);
    int quiet;
    quiet = 0;
    took = 0;
    while (quiet < 4 && took < 40) begin
      @(negedge clk);
      took++;
      quiet = (err == '0) ? quiet + 1 : 0;
    end
    took -= 4;
    checks++;
    if (quiet < 4) begin
      failures++;
      $display("FAIL %s: no regulation after 40 cycles (err=%0d)", what, err);
    end
    checks++;
    if (vref == code_t'(42) && (vout < 0.94 || vout > 0.98)) begin
      failures++;
      $display("FAIL %s: V_OUT = %f V", what, vout);
    end
    $display("%s: settled in %0d cycles (%0d ns), V_OUT = %f V, cells on %0d",
             what, took, took * 25, vout, u_count);
  endtask

  task automatic load_edge(real to);
    real from;
    from = i_src;
    for (int k = 1; k <= 50; k++) begin
      #(DT_NS);
      i_src = from + (to - from) * real'(k) / 50.0;
    end
  endtask

  initial begin
    int took;
    v_min = 10.0; v_max = 0.0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    settle("start-up", took);
    repeat (10) @(negedge clk);

    // Load step up by 40 mA.
    @(posedge clk) #3;
    v_min = vout;
    load_edge(0.060);
    settle("load step up", took);
    $display("  undershoot %0.1f mV", (0.95 - v_min) * 1000.0);
    if (took > 0) n_under++;
    repeat (10) @(negedge clk);

    // Load step down by 40 mA.
    @(posedge clk) #3;
    v_max = vout;
    load_edge(0.020);
    settle("load step down", took);
    $display("  overshoot %0.1f mV", (v_max - 0.95) * 1000.0);
    if (took > 0) n_over++;
    repeat (10) @(negedge clk);

    // Second step up, then line steps 1.0 V -> 1.03 V -> 1.0 V.
    load_edge(0.060);
    settle("load step up again", took);
    repeat (10) @(negedge clk);
    vin = 1.03;
    settle("line step up", took);
    if (took > 0) n_line++;
    repeat (10) @(negedge clk);
    vin = 1.0;
    settle("line step down", took);
    if (took > 0) n_line++;
    repeat (10) @(negedge clk);

    // Reference far below: largest error range, lower clamp.
    vref = code_t'(8);
    repeat (12) @(negedge clk);
    vref = code_t'(42);
    settle("reference back from 8", took);

    // Reference at full scale: upper clamp.
    vref = code_t'(63);
    repeat (12) @(negedge clk);
    vref = code_t'(42);
    settle("reference back from 63", took);

    $display("ranges 00/01/10/11: %0d %0d %0d %0d, clamps hi/lo %0d %0d, under %0d over %0d line %0d",
             n_range[0], n_range[1], n_range[2], n_range[3], n_clamp_hi, n_clamp_lo,
             n_under, n_over, n_line);
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (n_range[r] == 0) begin failures++; $display("FAIL error range %0d never seen", r); end
    end
    checks++; if (n_hold == 0)     begin failures++; $display("FAIL hold never seen"); end
    checks++; if (n_clamp_hi == 0) begin failures++; $display("FAIL upper clamp never seen"); end
    checks++; if (n_clamp_lo == 0) begin failures++; $display("FAIL lower clamp never seen"); end
    checks++; if (n_under == 0)    begin failures++; $display("FAIL no undershoot to recover"); end
    checks++; if (n_over == 0)     begin failures++; $display("FAIL no overshoot to recover"); end
    checks++; if (n_line == 0)     begin failures++; $display("FAIL line step had no effect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
