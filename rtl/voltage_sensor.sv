// voltage_sensor: behavioural model (not synthesizable) of the capacitor-
// based sensor that turns V_OUT into a time interval.
//
// While clk is low the sampling capacitor C_C is pre-charged to V_OUT and
// the output OUT is held low. When clk rises, a current source I_C starts
// to charge the capacitor; the inverter chain behind it switches OUT high
// once the charge C_C*V_OUT has been moved, i.e. after
//
//   dt = T_OFFSET + C_C * V_OUT / I_C
//
// The linear term is the sensor's charge balance with the design's values
// C_C = 450 fF and I_C = 100 uA (4.5 ns per volt). T_OFFSET stands for the
// fixed delay of the switches and of the inverter chain; its default of
// 1.85 ns is this model's choice, set so that 0 V reads as about 12.75
// buffer delays of the TDC, the intercept of the converter's measured
// transfer curve. The curve's slight bow is not modelled. dt is clamped to
// T_MAX so that OUT always rises while clk is still high.
//
// Ports: clk (sampling clock), vout (voltage in volts), out (the time
// signal that clocks the TDC's flip-flops).
`timescale 1ns / 1ps
module voltage_sensor #(
  parameter real C_C_FF      = 450.0,  // sampling capacitor, fF
  parameter real I_C_UA      = 100.0,  // charging current, uA
  parameter real T_OFFSET_NS = 1.85,   // fixed delay, ns
  parameter real T_MAX_NS    = 12.0    // longest interval, ns (below clk high time)
) (
  input  logic clk,
  input  real  vout,
  output logic out
);

  // Charge-phase length for a sampled voltage, ns.
  function automatic real charge_time_ns(real v);
    real t;
    t = T_OFFSET_NS + C_C_FF * ((v > 0.0) ? v : 0.0) / I_C_UA;  // fF*V/uA = ns
    return (t > T_MAX_NS) ? T_MAX_NS : t;
  endfunction

  initial out = 1'b0;

  // Pre-charge phase: OUT low.
  always @(negedge clk) out <= 1'b0;

  // Charge phase: OUT rises dt after the rising clock edge, dt set by the
  // voltage held on C_C at that edge.
  always @(posedge clk) #(charge_time_ns(vout)) out <= 1'b1;

endmodule
