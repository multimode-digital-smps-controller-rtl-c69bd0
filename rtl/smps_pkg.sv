// Shared types and constants of the multimode SMPS controller.
//
// The windowed ADC reports the output-voltage error e[n] as a signed
// number of quantisation steps in the window -4..+4; the controller runs
// either in pulse-width (PWM) or pulse-frequency (PFM) regulation mode.
// The current-starved delay cells are biased by five binary-weighted
// transistors of relative sizes 1, 1, 2, 4 and 8; bias_weight() returns
// the number of unit currents a 5-bit bias code switches on.
`timescale 1ns/1ps
package smps_pkg;

  localparam int E_MIN = -4;
  localparam int E_MAX = 4;
  localparam int E_W   = 4;   // bits of the signed error word

  typedef logic signed [E_W-1:0] err_t;

  typedef enum logic {
    MODE_PWM = 1'b0,          // constant frequency, synchronous rectifier on
    MODE_PFM = 1'b1           // variable frequency, synchronous rectifier off
  } mode_e;

  // Unit currents switched on by a bias code: bit 0 drives a W/L device,
  // bit 1 another W/L device, bits 2..4 the 2W/L, 4W/L and 8W/L devices.
  function automatic int bias_weight(input logic [4:0] code);
    return int'(code[0]) + int'(code[1]) + 2 * int'(code[2]) +
           4 * int'(code[3]) + 8 * int'(code[4]);
  endfunction

endpackage
