// pi_controller: adaptive PI controller driving the PMOS array.
//
// Each clock it turns the error (V_REF - V_OUT, in TDC codes) into the number
// of PMOS cells to switch on, 0..63, and presents that number as a 63-bit
// thermometer gate code u[62:0] (u[i] = 1 turns cell i on). The control law
// is the positional PI of the design's hybrid model:
//
//   u[n]     = K'p * e[n] + acc[n]
//   acc[n+1] = acc[n] + K'i * e[n]      (integrator: K'i z^-1 / (1 - z^-1))
//
// K'p and K'i are chosen every cycle from the error range State[1:0]
// reported by the error detector, following the design's coefficient table:
//
//   State  K'p   K'i
//   00     hold  hold   (regulated: output and integrator keep their values)
//   01     0.8   4
//   10     1     0.7
//   11     1.2   0.1
//
// Coefficients are unsigned Q4.8 (0.8 -> 205/256, 0.7 -> 179/256,
// 0.1 -> 26/256, 1.2 -> 307/256). The integrator is kept in the same Q8
// units of "cells". Both the integrator and the output are clamped to
// 0..63 cells (anti-windup), and the output is rounded to the nearest cell.
// The number format, the rounding, the clamping and the reset value (all
// cells off) are this implementation's choices; the table does not give
// them.
//
// Timing: the sum is formed combinationally from err and state and
// registered on the rising clock edge, so u follows e one cycle later.
// Reset is asynchronous, active low.
`timescale 1ns / 1ps
module pi_controller
  import dldo_pkg::*;
#(
  parameter int unsigned KP_SMALL = 205,   // 0.8 in Q8, State 01
  parameter int unsigned KI_SMALL = 1024,  // 4   in Q8, State 01
  parameter int unsigned KP_MID   = 256,   // 1   in Q8, State 10
  parameter int unsigned KI_MID   = 179,   // 0.7 in Q8, State 10
  parameter int unsigned KP_LARGE = 307,   // 1.2 in Q8, State 11
  parameter int unsigned KI_LARGE = 26     // 0.1 in Q8, State 11
) (
  input  logic              clk,
  input  logic              rst_n,
  input  err_t              err,      // V_REF - V_OUT
  input  state_e            state,    // error range from the error detector
  output logic [NCELLS-1:0] u,        // gate code u[62:0], thermometer
  output code_t             u_count,  // number of cells on
  output logic [13:0]       acc       // integrator, Q8 cells
);

  localparam int ACC_MAX = int'(NCELLS) << COEF_FRAC;

  int kp, ki;          // selected coefficients, Q8
  int p_term, i_step;  // K'p*e and K'i*e, Q8
  int sum, acc_sum;
  code_t u_next;
  logic [13:0] acc_next;

  always_comb begin
    unique case (state)
      ST_SMALL: begin kp = int'(KP_SMALL); ki = int'(KI_SMALL); end
      ST_MID:   begin kp = int'(KP_MID);   ki = int'(KI_MID);   end
      ST_LARGE: begin kp = int'(KP_LARGE); ki = int'(KI_LARGE); end
      default:  begin kp = 0;              ki = 0;              end
    endcase
    p_term  = kp * int'(err);
    i_step  = ki * int'(err);
    sum     = p_term + int'(acc) + (1 << (COEF_FRAC - 1));  // round to nearest
    acc_sum = int'(acc) + i_step;

    if (sum < 0)                 u_next = '0;
    else if (sum >= ACC_MAX)     u_next = code_t'(NCELLS);
    else                         u_next = code_t'(sum >>> COEF_FRAC);

    if (acc_sum < 0)             acc_next = '0;
    else if (acc_sum > ACC_MAX)  acc_next = 14'(ACC_MAX);
    else                         acc_next = 14'(acc_sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_count <= '0;
      acc     <= '0;
    end else if (state != ST_ZERO) begin
      u_count <= u_next;
      acc     <= acc_next;
    end
  end

  // Thermometer gate code: the u_count lowest cells are on.
  always_comb
    for (int i = 0; i < NCELLS; i++) u[i] = (code_t'(i) < u_count);

endmodule
