// digital_controller: the digital half of the D-LDO loop.
//
// Takes the TDC's thermometer code of V_OUT and the binary reference V_REF,
// and produces the PMOS gate code u[62:0]. Inside, as in the design's block
// diagram, a digital subtractor forms error = V_REF - V_OUT, the error
// detector sorts it into a range State[1:0], and the adaptive PI controller
// uses both to update the number of cells that are on.
//
// Timing: vout_therm is sampled on the rising clock edge that ends the
// TDC's conversion; u changes on that edge (one register stage, in the PI
// controller). Reset is asynchronous, active low, and turns every cell off.
`timescale 1ns / 1ps
module digital_controller
  import dldo_pkg::*;
#(
  parameter int unsigned KP_SMALL = 205,   // 0.8 in Q8
  parameter int unsigned KI_SMALL = 1024,  // 4   in Q8
  parameter int unsigned KP_MID   = 256,   // 1   in Q8
  parameter int unsigned KI_MID   = 179,   // 0.7 in Q8
  parameter int unsigned KP_LARGE = 307,   // 1.2 in Q8
  parameter int unsigned KI_LARGE = 26     // 0.1 in Q8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NCELLS-1:0] vout_therm,  // V_OUT[62:0] from the TDC
  input  code_t             vref,        // V_REF[5:0]
  output logic [NCELLS-1:0] u,           // PMOS gate code u[62:0]
  output code_t             u_count,     // cells on
  output code_t             vout_code,   // V_OUT as a binary count
  output err_t              err,         // V_REF - V_OUT
  output state_e            state,       // error range
  output code_t             err_mag,     // |V_REF - V_OUT|, Error[5:0]
  output logic [13:0]       acc          // PI integrator, Q8 cells
);

  digital_sub u_sub (
    .vout_therm (vout_therm),
    .vref       (vref),
    .vout_code  (vout_code),
    .err        (err)
  );

  error_detector u_det (
    .err     (err),
    .err_mag (err_mag),
    .state   (state)
  );

  pi_controller #(
    .KP_SMALL (KP_SMALL), .KI_SMALL (KI_SMALL),
    .KP_MID   (KP_MID),   .KI_MID   (KI_MID),
    .KP_LARGE (KP_LARGE), .KI_LARGE (KI_LARGE)
  ) u_pi (
    .clk     (clk),
    .rst_n   (rst_n),
    .err     (err),
    .state   (state),
    .u       (u),
    .u_count (u_count),
    .acc     (acc)
  );

endmodule
