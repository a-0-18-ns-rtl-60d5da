// dldo_top: the complete digital LDO regulator, one clock-driven loop.
//
//   V_OUT -> voltage_sensor -> tdc -> digital_controller -> pmos_array -> V_OUT
//
// Each clock cycle the sensor samples V_OUT during the low phase and turns
// it into a delay during the high phase; the TDC counts that delay in buffer
// delays and leaves a 63-bit thermometer code in its flip-flops. On the next
// rising edge the digital controller subtracts that code from the binary
// reference vref, classifies the error and updates the adaptive PI output,
// the number of PMOS cells that are on. The cells feed current from V_IN to
// V_OUT. So a change of V_OUT reaches the gates one clock cycle after it was
// sampled, and the controller can move many cells at once (multi-bit
// regulation) instead of one per cycle.
//
// The output node itself (load capacitor, load resistor and load current)
// is outside this module: vout comes in as a voltage and i_pmos goes out as
// the current the pass devices deliver into it. The analog parts are
// behavioural models; the digital controller is synthesizable.
//
// Defaults follow the design: 63 cells, t_d = 0.145 ns, C_C = 450 fF,
// I_C = 100 uA, a 40 MHz clock supplied from outside. vref = 42 sets
// V_OUT near 0.95 V with the sensor's default offset.
`timescale 1ns / 1ps
module dldo_top
  import dldo_pkg::*;
#(
  parameter real TD_NS       = 0.145,   // TDC buffer delay, ns
  parameter real C_C_FF      = 450.0,   // sensor capacitor, fF
  parameter real I_C_UA      = 100.0,   // sensor charging current, uA
  parameter real T_OFFSET_NS = 1.85,    // sensor fixed delay, ns
  parameter real G_CELL_S    = 0.03175  // conductance of one PMOS cell, S
) (
  input  logic              clk,         // sampling clock, 40 MHz
  input  logic              rst_n,       // asynchronous, active low
  input  code_t             vref,        // V_REF[5:0], target in TDC codes
  input  real               vin,         // supply voltage, V
  input  real               vout,        // regulated output voltage, V
  output real               i_pmos,      // current of the pass devices, A
  output logic [NCELLS-1:0] vout_therm,  // TDC thermometer code
  output logic [NCELLS-1:0] u,           // PMOS gate code
  output code_t             u_count,     // cells on
  output code_t             vout_code,   // measured V_OUT code
  output err_t              err,         // V_REF - V_OUT code
  output state_e            state,       // error range
  output code_t             err_mag,     // |error|
  output logic [13:0]       acc          // PI integrator, Q8 cells
);

  logic sense_out;

  voltage_sensor #(
    .C_C_FF      (C_C_FF),
    .I_C_UA      (I_C_UA),
    .T_OFFSET_NS (T_OFFSET_NS)
  ) u_sensor (
    .clk  (clk),
    .vout (vout),
    .out  (sense_out)
  );

  tdc #(
    .NCELLS (NCELLS),
    .TD_NS  (TD_NS)
  ) u_tdc (
    .clk   (clk),
    .out   (sense_out),
    .therm (vout_therm)
  );

  digital_controller u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .vout_therm (vout_therm),
    .vref       (vref),
    .u          (u),
    .u_count    (u_count),
    .vout_code  (vout_code),
    .err        (err),
    .state      (state),
    .err_mag    (err_mag),
    .acc        (acc)
  );

  pmos_array #(
    .NCELLS   (NCELLS),
    .G_CELL_S (G_CELL_S)
  ) u_pmos (
    .u     (u),
    .vin   (vin),
    .vout  (vout),
    .i_out (i_pmos)
  );

endmodule
