// tb_digital_controller: feeds thermometer codes and references into the
// whole digital controller and checks, every cycle, the measured code, the
// error, the error range and the PI output against a reference model.
// Includes a sequence that closes a simple loop in the testbench (the code
// follows the number of cells on), so the output settles to the reference.
`timescale 1ns / 1ps
module tb_digital_controller;
  import dldo_pkg::*;
  import pi_ref_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic [NCELLS-1:0] therm = '0;
  code_t             vref = '0;
  logic [NCELLS-1:0] u;
  code_t             u_count, vout_code, err_mag;
  err_t              err;
  state_e            state;
  logic [13:0]       acc;
  int                checks = 0, failures = 0;
  int                m_acc = 0, m_u = 0;

  always #12.5 clk = ~clk;

  digital_controller dut (
    .clk(clk), .rst_n(rst_n), .vout_therm(therm), .vref(vref), .u(u),
    .u_count(u_count), .vout_code(vout_code), .err(err), .state(state),
    .err_mag(err_mag), .acc(acc)
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NCELLS-1:0] thermo(int n);
    logic [NCELLS-1:0] t;
    t = '0;
    for (int i = 0; i < n; i++) t[i] = 1'b1;
    return t;
  endfunction

  task automatic cycle(int n, int r);
    int e;
    @(negedge clk);
    therm = thermo(n);
    vref  = code_t'(r);
    e = r - n;
    #1;
    checks++;
    if (int'(vout_code) != n || int'(err) != e || int'(state) != range_of(e)) begin
      failures++;
      $display("FAIL n=%0d r=%0d: code=%0d err=%0d state=%0d", n, r, vout_code, err, state);
    end
    @(posedge clk);
    step(m_acc, m_u, e);
    #1;
    checks++;
    if (int'(u_count) != m_u || u != thermo(m_u) || int'(acc) != m_acc) begin
      failures++;
      $display("FAIL n=%0d r=%0d: u=%0d acc=%0d expected %0d %0d", n, r, u_count, acc, m_u, m_acc);
    end
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 1500; k++)
      cycle(int'($urandom_range(63)), int'($urandom_range(63)));
    // Loop closed in the testbench: measured code = 30 + cells on / 8.
    for (int k = 0; k < 60; k++) begin
      n = 30 + m_u / 8;
      cycle(n, 35);
    end
    checks++;
    if (30 + m_u / 8 != 35) begin
      failures++;
      $display("FAIL loop did not settle: cells on %0d", m_u);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
