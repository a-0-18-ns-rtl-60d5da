// pmos_array: behavioural model (analog, not synthesizable) of the power
// stage: NCELLS identical PMOS pass devices between V_IN and V_OUT.
//
// Cell i conducts when its gate code bit u[i] is 1 (the gate is then pulled
// low). Near drop-out the devices work as switches in their linear region,
// so each one on is modelled as a conductance G_CELL from V_IN to V_OUT:
//
//   i_out = (number of ones in u) * G_CELL * (V_IN - V_OUT),  0 if V_OUT >= V_IN
//
// The design gives 63 cells and a 100 mA maximum load at V_IN = 1 V,
// V_OUT = 0.95 V; the default G_CELL = 100 mA / (63 * 50 mV) = 31.75 mS
// follows from those numbers. The linear model itself is this model's
// choice.
//
// Ports: u (gate code), vin and vout (volts), i_out (amperes into V_OUT).
`timescale 1ns / 1ps
module pmos_array #(
  parameter int unsigned NCELLS  = 63,
  parameter real         G_CELL_S = 0.03175  // conductance of one cell, S
) (
  input  logic [NCELLS-1:0] u,
  input  real               vin,
  input  real               vout,
  output real               i_out
);

  int n_on;

  always_comb begin
    n_on = 0;
    for (int i = 0; i < int'(NCELLS); i++) n_on += int'(u[i]);
  end

  assign i_out = (vin > vout) ? real'(n_on) * G_CELL_S * (vin - vout) : 0.0;

endmodule
