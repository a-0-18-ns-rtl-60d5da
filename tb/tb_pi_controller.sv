// tb_pi_controller: drives the adaptive PI controller with runs of errors
// (random, steady, zero and full-scale of either sign) and compares the cell
// count, the thermometer gate code and the integrator with a reference
// model after every clock edge. It also checks that a new error reaches the
// output exactly one clock edge later and that State 00 holds the output.
`timescale 1ns / 1ps
module tb_pi_controller;
  import dldo_pkg::*;
  import pi_ref_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0;
  err_t              err = '0;
  state_e            state;
  logic [NCELLS-1:0] u;
  code_t             u_count;
  logic [13:0]       acc;
  int                checks = 0, failures = 0;
  int                m_acc = 0, m_u = 0;
  int                seen_range[4] = '{0, 0, 0, 0};
  int                seen_clamp_hi = 0, seen_clamp_lo = 0;

  always #12.5 clk = ~clk;

  // The error range comes from the error detector in the system; here the
  // testbench supplies it from its own classification.
  always_comb state = state_e'(range_of(int'(err)));

  pi_controller dut (
    .clk(clk), .rst_n(rst_n), .err(err), .state(state),
    .u(u), .u_count(u_count), .acc(acc)
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    logic [NCELLS-1:0] exp_u;
    exp_u = '0;
    for (int i = 0; i < m_u; i++) exp_u[i] = 1'b1;
    checks++;
    if (int'(u_count) != m_u || u != exp_u || int'(acc) != m_acc) begin
      failures++;
      $display("FAIL t=%0t err=%0d: u=%0d acc=%0d, expected u=%0d acc=%0d",
               $time, err, u_count, acc, m_u, m_acc);
    end
  endtask

  // Apply one error for one clock edge and compare afterwards.
  task automatic apply(int e);
    @(negedge clk);
    err = err_t'(e);
    seen_range[range_of(e)]++;
    @(posedge clk);
    step(m_acc, m_u, e);
    if (m_u == 63) seen_clamp_hi++;
    if (m_u == 0 && e < 0) seen_clamp_lo++;
    #1 compare();
  endtask

  initial begin
    int held;
    repeat (2) @(posedge clk);
    #1 compare();  // reset state
    @(negedge clk) rst_n = 1'b1;

    // Latency: a step of error is seen at the output after exactly one edge.
    @(negedge clk) err = err_t'(10);
    #1;
    checks++;
    if (u_count != '0) begin
      failures++;
      $display("FAIL output changed ahead of the clock edge");
    end
    @(posedge clk);
    step(m_acc, m_u, 10);
    #1 compare();

    // Hold: State 00 keeps output and integrator.
    held = int'(u_count);
    for (int k = 0; k < 5; k++) apply(0);
    checks++;
    if (int'(u_count) != held) begin
      failures++;
      $display("FAIL hold changed the output");
    end

    // Steady positive errors of each range: drive into the top clamp.
    for (int k = 0; k < 6; k++) apply(3);
    for (int k = 0; k < 6; k++) apply(12);
    for (int k = 0; k < 20; k++) apply(40);
    // Large negative errors: drive down to the bottom clamp.
    for (int k = 0; k < 20; k++) apply(-50);
    for (int k = 0; k < 6; k++) apply(-9);
    for (int k = 0; k < 6; k++) apply(-1);
    // Random errors.
    for (int k = 0; k < 2000; k++) apply(int'($urandom_range(126)) - 63);
    for (int k = 0; k < 1000; k++) apply(int'($urandom_range(14)) - 7);

    for (int r = 0; r < 4; r++) begin
      checks++;
      if (seen_range[r] == 0) begin
        failures++;
        $display("FAIL error range %0d never applied", r);
      end
    end
    checks++;
    if (seen_clamp_hi == 0 || seen_clamp_lo == 0) begin
      failures++;
      $display("FAIL clamps not reached: hi=%0d lo=%0d", seen_clamp_hi, seen_clamp_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
