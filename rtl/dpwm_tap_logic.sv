// Digital part of the segmented-ring DPWM: the two 16:1 multiplexers, the
// SR latch that forms c(t), and the gate that closes or opens the ring.
//
// A single short pulse travels along a line of 16 slow cells (each 16 fast
// cells long). In PWM mode (en = 1) the end of the slow line is fed back to
// its start, so the pulse circles with a period of 16 slow delays = 256
// fast delays. Each time it passes the start (ring_in) the SR latch is set.
// MUX-B, addressed by duty[7:4], forwards the pulse from slow tap duty[7:4]
// into a line of 16 fast cells; MUX-A, addressed by duty[3:0], picks fast
// tap duty[3:0] and resets the latch. c(t) is therefore high for
// duty[7:4] slow + duty[3:0] fast delays, a duty ratio of duty/256.
// In PFM mode (en = 0) the ring is open and each st pulse launches one
// pulse: the module is a delay line and c(t) is one pulse of width
// duty fast delays (duty then carries t_on[n]). st also kicks the ring
// in PWM mode, since an empty ring does not start by itself.
//
// The reset input of the latch dominates, so duty = 0 gives no pulse.
// c_q is a level-sensitive SR latch on purpose: the modulator has no clock,
// and the latch is the element the architecture is built around; it is the
// one latch this module infers. cycle_start marks the start of every
// switching period and clocks the ADC and the compensator.
// Timing: pure logic, zero delay; all timing comes from the delay lines.
`timescale 1ns/1ps
module dpwm_tap_logic (
  input  logic        rst_n,      // asynchronous clear of the latch
  input  logic        en,         // 1: ring closed (PWM), 0: delay line (PFM)
  input  logic        st,         // start pulse
  input  logic [7:0]  duty,       // d[n] in PWM, t_on[n] in PFM
  input  logic        ring_end,   // output of the last slow cell
  input  logic [15:0] slow_tap,   // slow_tap[k]: pulse after k slow cells
  input  logic [15:0] fast_tap,   // fast_tap[k]: pulse after k fast cells
  output logic        ring_in,    // input of the slow line (= slow tap 0)
  output logic        fast_in,    // input of the fast line (MUX-B output)
  output logic        latch_rst,  // MUX-A output
  output logic        c           // pulse-width modulated output c(t)
);

  logic c_q;

  assign ring_in   = (en & ring_end) | st;
  assign fast_in   = slow_tap[duty[7:4]];   // MUX-B, coarse
  assign latch_rst = fast_tap[duty[3:0]];   // MUX-A, fine

  always_latch begin
    if (!rst_n || latch_rst) c_q = 1'b0;
    else if (ring_in)        c_q = 1'b1;
  end

  assign c = c_q;

endmodule
