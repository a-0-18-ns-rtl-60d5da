// error_detector: sorts the regulation error into one of four ranges.
//
// The PI controller uses a different pair of coefficients in each range, so
// this block is what makes the controller adaptive. The error is signed
// (V_OUT above or below the reference); the range depends only on its
// magnitude, Error[5:0]:
//
//   |error| >= 32  -> State = 2'b11 (large)
//   |error| >=  8  -> State = 2'b10 (mid)
//   |error| >=  1  -> State = 2'b01 (small)
//   |error| ==  0  -> State = 2'b00 (regulated)
//
// The four ranges and their State codes are those of the design's state
// table. Its gate-level form tests single bits (Error[5], Error[3],
// Error[0]); here each range is read as a threshold, so that for example an
// error of 16 counts as "mid" and an error of 2 as "small". That reading and
// the use of the magnitude of a signed error are this implementation's
// choices.
//
// Purely combinational; no clock.
`timescale 1ns / 1ps
module error_detector
  import dldo_pkg::*;
(
  input  err_t         err,      // V_REF - V_OUT in TDC codes, two's complement
  output code_t        err_mag,  // |err|, Error[5:0]
  output state_e       state     // error range, State[1:0]
);

  always_comb begin
    err_mag = err[ERR_W-1] ? code_t'(-err) : code_t'(err);
    if (err_mag >= code_t'(32))     state = ST_LARGE;
    else if (err_mag >= code_t'(8)) state = ST_MID;
    else if (err_mag != '0)         state = ST_SMALL;
    else                            state = ST_ZERO;
  end

endmodule
