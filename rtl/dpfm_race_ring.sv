// Behavioural model of the signal-race ring of the digital pulse-frequency
// modulator (DPFM).
//
// The ring has N_STAGES SR latches, all cleared at the start. The rising
// edge of c(t) launches a set pulse that moves from latch to latch through
// current-starved cells (delay ds per stage, set by the 5-bit bias, i.e.
// the five MSBs of f_pf[n]). The falling edge of c(t), T_on later, launches
// a reset pulse that moves through inverters (delay di < ds per stage) and
// clears each latch it passes. The reset pulse gains ds - di per stage, and
// when it catches the set pulse every latch output is zero; the set pulse
// is then absorbed and the race is over. q is watched by the end-of-race
// detector. The race therefore lasts about T_on * ds / (ds - di): long
// switching periods are produced from short, fast delays.
//
// Cell law: ds = T_CS_FULL_NS * (16 + BASE_WEIGHT) / (weight + BASE_WEIGHT)
// (see cs_delay_cell); the fixed BASE_WEIGHT current and all delay values
// are this design's assumptions: ds runs from 12.5 ns (no programmable
// current) to 10 ns (full current) against di = 9.95 ns, so the race lasts
// about 5 to 200 times T_on; T_on = 500 ns then spans about 10 kHz to
// 400 kHz. N_STAGES must exceed T_on / ds
// so the reset pulse starts less than one lap behind. The latches react
// T_LATCH_NS after an edge of c(t). en = 0 aborts any race and clears q.
// Not synthesizable.
`timescale 1ns/1ps
module dpfm_race_ring #(
  parameter int  N_STAGES     = 64,
  parameter real T_CS_FULL_NS = 10.0,   // set-path stage delay, full bias
  parameter int  BASE_WEIGHT  = 64,     // always-on current of the cells
  parameter real T_INV_NS     = 9.95,   // reset-path (inverter) stage delay
  parameter real T_LATCH_NS   = 0.05    // latch response to c(t)
) (
  input  logic                en,      // PFM mode
  input  logic                c,       // DPWM output, pulse of width T_on
  input  logic [4:0]          bias,    // five MSBs of f_pf[n]
  output logic [N_STAGES-1:0] q        // latch outputs
);
  import smps_pkg::*;

  int unsigned race_id;   // identifies the race in progress
  logic        racing;

  initial begin
    q       = '0;
    racing  = 1'b0;
    race_id = 0;
  end

  function automatic realtime set_delay(input logic [4:0] code);
    return T_CS_FULL_NS * real'(16 + BASE_WEIGHT) /
           real'(bias_weight(code) + BASE_WEIGHT);
  endfunction

  // Set pulse: launched by the rising edge of c(t).
  always begin
    @(posedge c);
    if (en) begin
      race_id = race_id + 1;
      racing  = 1'b1;
      fork
        begin
          automatic int unsigned id = race_id;
          automatic int          k  = 0;
          #(T_LATCH_NS);
          if (racing && id == race_id) q[0] = 1'b1;
          while (racing && id == race_id) begin
            #(set_delay(bias));
            if (!(racing && id == race_id)) break;
            k = (k + 1) % N_STAGES;
            q[k] = 1'b1;
          end
        end
      join_none
    end
  end

  // Reset pulse: launched by the falling edge of c(t).
  always begin
    @(negedge c);
    if (en && racing) begin
      fork
        begin
          automatic int unsigned id = race_id;
          automatic int          k  = 0;
          #(T_LATCH_NS);
          while (racing && id == race_id) begin
            q[k] = 1'b0;
            if (q == '0) begin
              racing = 1'b0;     // the pulses have met
              break;
            end
            #(T_INV_NS);
            k = (k + 1) % N_STAGES;
          end
        end
      join_none
    end
  end

  // Leaving PFM aborts the race.
  always begin
    @(negedge en);
    racing  = 1'b0;
    race_id = race_id + 1;
    q       = '0;
  end

endmodule
