// digital_sub: error between the reference and the measured output voltage.
//
// The TDC delivers V_OUT as a thermometer code (bit i set when the sensor's
// delay covered more than i+1 buffer delays), while the reference V_REF is a
// binary code. The block counts the ones of the thermometer code to get a
// binary V_OUT code 0..63 and subtracts it from V_REF:
//
//   err = V_REF - V_OUT   (signed, -63..+63)
//
// A positive error means the output is low and more PMOS cells must be
// turned on. The encoder counts ones rather than locating the top one, so a
// thermometer code with a bubble still gives the nearest count; that choice
// is this implementation's. The design states only that the block holds an
// encoder and a subtractor.
//
// Purely combinational; no clock.
`timescale 1ns / 1ps
module digital_sub
  import dldo_pkg::*;
(
  input  logic [NCELLS-1:0] vout_therm,  // V_OUT[62:0], thermometer code from the TDC
  input  code_t             vref,        // V_REF[5:0], binary reference code
  output code_t             vout_code,   // V_OUT as a binary count
  output err_t              err          // V_REF - V_OUT
);

  always_comb begin
    vout_code = '0;
    for (int i = 0; i < NCELLS; i++) vout_code += code_t'(vout_therm[i]);
    err = err_t'({1'b0, vref}) - err_t'({1'b0, vout_code});
  end

endmodule
