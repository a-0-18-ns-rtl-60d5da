// dldo_pkg: widths, the error-range encoding and the fixed-point format
// shared by the digital controller of the D-LDO.
//
// The loop works on codes of a 63-cell thermometer: the TDC reports the
// output voltage as 0..63 buffer delays and the PI controller turns on 0..63
// PMOS cells. Both counts therefore fit in 6 bits, and their difference (the
// error) in a signed 7-bit word. The four error ranges and their encoding
// State[1:0] follow the state table of the design; the Q8 fixed-point
// format of the PI coefficients is this implementation's choice.
`timescale 1ns / 1ps
package dldo_pkg;

  // Number of TDC delay cells and of PMOS pass devices.
  localparam int unsigned NCELLS = 63;
  // Width of a binary count 0..NCELLS.
  localparam int unsigned CODE_W = $clog2(NCELLS + 1);
  // Width of the signed error V_REF - V_OUT, both 0..NCELLS.
  localparam int unsigned ERR_W = CODE_W + 1;
  // Fractional bits of the PI coefficients and of the integrator.
  localparam int unsigned COEF_FRAC = 8;
  localparam int unsigned COEF_W = 12;  // unsigned Q4.8, up to 15.996

  typedef logic [CODE_W-1:0] code_t;
  typedef logic signed [ERR_W-1:0] err_t;
  typedef logic [COEF_W-1:0] coef_t;

  // Error ranges reported by the error detector, State[1:0].
  typedef enum logic [1:0] {
    ST_ZERO  = 2'b00,  // |error| = 0 : regulated, PI holds
    ST_SMALL = 2'b01,  // |error| >= 1
    ST_MID   = 2'b10,  // |error| >= 8
    ST_LARGE = 2'b11   // |error| >= 32
  } state_e;

endpackage
