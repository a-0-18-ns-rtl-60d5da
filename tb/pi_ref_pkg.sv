// pi_ref_pkg: reference model of the adaptive PI controller for the
// testbenches. It recomputes, from the real-valued coefficient table, what
// the controller must do each cycle: pick the coefficient pair from the
// error magnitude, form the rounded and clamped output and update the
// clamped integrator. Coefficients are converted to 1/256 steps here, from
// their decimal values, independently of the RTL's parameter defaults.
`timescale 1ns / 1ps
package pi_ref_pkg;

  function automatic int q8(real c);
    return $rtoi(c * 256.0 + 0.5);
  endfunction

  // Error range 0..3 from the signed error, by magnitude thresholds.
  function automatic int range_of(int e);
    int m;
    m = (e < 0) ? -e : e;
    if (m >= 32) return 3;
    if (m >= 8)  return 2;
    if (m >= 1)  return 1;
    return 0;
  endfunction

  // One clock edge of the controller: updates acc (1/256 cells) and u (cells).
  function automatic void step(inout int acc, inout int u, input int e);
    real kp, ki;
    int  s, a;
    case (range_of(e))
      1:       begin kp = 0.8; ki = 4.0; end
      2:       begin kp = 1.0; ki = 0.7; end
      3:       begin kp = 1.2; ki = 0.1; end
      default: return;  // error zero: hold
    endcase
    s = q8(kp) * e + acc;
    if (s + 128 < 0) u = 0;
    else begin
      u = (s + 128) / 256;
      if (u > 63) u = 63;
    end
    a = acc + q8(ki) * e;
    acc = (a < 0) ? 0 : (a > 63 * 256) ? 63 * 256 : a;
  endfunction

endpackage
