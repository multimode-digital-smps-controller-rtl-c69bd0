// Behavioural model of the programmable current-starved delay cell.
//
// The real cell is analog: an inverter whose charging current is mirrored
// from a bias circuit built of five binary-weighted transistors (W/L, W/L,
// 2W/L, 4W/L, 8W/L), so its delay is inversely proportional to the number
// of unit currents switched on by the 5-bit bias code. This model keeps
// that law: delay = T_FULL_NS * (16 + BASE_WEIGHT) / (weight + BASE_WEIGHT),
// where weight is 0..16 and T_FULL_NS is the delay with every transistor
// on. BASE_WEIGHT models a fixed, always-on part of the bias current; it is
// this design's choice (0 for the DPWM cells, whose frequency is scaled
// 16:1 by the code). With no current at all (weight + BASE_WEIGHT = 0) the
// cell is starved and its output holds.
//
// Every edge of `in` reappears at `out` after the delay that holds when the
// edge arrives (transport delay), so short pulses survive, as they must for
// a pulse travelling around a ring. Not synthesizable.
`timescale 1ns/1ps
module cs_delay_cell #(
  parameter real T_FULL_NS   = 0.1953125,  // delay at full bias current
  parameter int  BASE_WEIGHT = 0           // always-on unit currents
) (
  input  logic       in,
  input  logic [4:0] bias,
  output logic       out
);
  import smps_pkg::*;

  initial out = 1'b0;

  always begin
    @(in);
    begin
      automatic logic    v = in;
      automatic int      w = bias_weight(bias) + BASE_WEIGHT;
      automatic realtime dly = T_FULL_NS * real'(16 + BASE_WEIGHT) / real'(w);
      if (w > 0) begin
        fork
          begin
            #(dly) out = v;
          end
        join_none
      end
    end
  end

endmodule
