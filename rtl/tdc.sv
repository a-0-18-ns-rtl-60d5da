// tdc: behavioural model (timing-based, not synthesizable as written) of the
// time-to-digital converter.
//
// A chain of NCELLS buffers, each with delay t_d, carries the rising edge of
// clk. The rising edge of the voltage sensor's OUT clocks one flip-flop per
// buffer output, so tap i (after i+1 buffers) is captured as 1 when the
// clock edge has passed it, i.e. when (i+1)*t_d < dt. The flip-flops thus
// hold a thermometer code with about dt/t_d ones, which stays valid until
// the next OUT edge, one clock period later. The chain length (63) and
// t_d = 0.145 ns follow the design; in silicon the buffers and flip-flops
// are standard cells and t_d is their delay.
//
// Ports: clk (launches the edge into the chain), out (time signal from the
// sensor), therm (thermometer code, bit i = tap i+1).
// The flip-flops start cleared, which this model chooses.
`timescale 1ns / 1ps
module tdc #(
  parameter int unsigned NCELLS = 63,
  parameter real         TD_NS  = 0.145  // buffer delay t_d, ns
) (
  input  logic              clk,
  input  logic              out,
  output logic [NCELLS-1:0] therm
);

  logic [NCELLS:0] tap;

  assign tap[0] = clk;

  for (genvar k = 1; k <= NCELLS; k++) begin : g_buf
    assign #(TD_NS) tap[k] = tap[k-1];
  end

  initial therm = '0;

  always @(posedge out) therm <= tap[NCELLS:1];

endmodule
