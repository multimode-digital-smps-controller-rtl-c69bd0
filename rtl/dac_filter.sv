// Behavioural model of the reconstruction low-pass filter of the
// sigma-delta reference DAC.
//
// A single RC pole with time constant TAU_NS, evaluated every T_STEP_NS:
// v_ref moves toward V_FS when the bit stream is one and toward 0 when it
// is zero, so it settles at V_FS times the density of ones, with a ripple
// of about V_FS * T_clk / TAU. The document does not describe the filter;
// the single pole, V_FS and TAU are this design's assumptions. V_INIT is
// the starting voltage. Not synthesizable.
`timescale 1ns/1ps
module dac_filter #(
  parameter real V_FS      = 3.3,
  parameter real TAU_NS    = 20000.0,
  parameter real T_STEP_NS = 10.0,
  parameter real V_INIT    = 0.0
) (
  input  logic bit_in,
  output real  v_ref
);

  initial v_ref = V_INIT;

  always begin
    #(T_STEP_NS);
    v_ref = v_ref + ((bit_in ? V_FS : 0.0) - v_ref) * (T_STEP_NS / TAU_NS);
  end

endmodule
