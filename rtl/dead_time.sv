// Behavioural model of the programmable dead-time circuit.
//
// In PWM mode c(t) drives the main switch Q1 and its complement the
// synchronous rectifier Q2. A copy of c(t) delayed by dt_code * T_UNIT_NS
// (a chain of delay cells in silicon) is combined with c(t) so that
// Q1 turns on only after Q2 has been off for the dead time and Q2 turns on
// only after Q1 has been off for the dead time:
//     gate_hs = c & c_dly,   gate_ls = ~c & ~c_dly.
// In PFM mode the circuit is bypassed: gate_hs = c and Q2 stays off, so the
// inductor current may become discontinuous. The gating follows the
// document's description; the 4-bit code and T_UNIT_NS are this design's
// choice. dt_code = 0 gives no dead time. Not synthesizable (delay).
`timescale 1ns/1ps
module dead_time
  import smps_pkg::*;
#(
  parameter real T_UNIT_NS = 0.5
) (
  input  logic       c,
  input  mode_e      mode,
  input  logic [3:0] dt_code,
  output logic       gate_hs,   // Q1, main switch
  output logic       gate_ls    // Q2, synchronous rectifier
);

  logic c_dly;

  initial c_dly = 1'b0;

  always begin
    @(c);
    begin
      automatic logic    v   = c;
      automatic realtime dly = T_UNIT_NS * real'(dt_code);
      if (dt_code == 4'd0) c_dly = v;
      else fork
        begin
          #(dly) c_dly = v;
        end
      join_none
    end
  end

  always_comb begin
    if (mode == MODE_PFM) begin
      gate_hs = c;
      gate_ls = 1'b0;
    end else begin
      gate_hs = c & c_dly;
      gate_ls = ~c & ~c_dly;
    end
  end

endmodule
