// Segmented ring-oscillator DPWM (8 bits), assembled from two delay lines
// of current-starved cells and the tap logic.
//
// The slow line has 16 cells, each 16 times slower than a fast cell; the
// fast line has 16 fast cells. With en = 1 the slow line is closed into a
// ring and the modulator runs free at f_sw = 1 / (256 * T_fast) with duty
// ratio duty/256, so the 256 positions of a plain ring DPWM are reached
// with 32 cells and two 16:1 multiplexers. With en = 0 it is a one-shot
// delay line: each st pulse gives one c(t) pulse of duty * T_fast.
// bias sets the cell current of both lines and so the switching frequency:
// with T_FAST_NS = 0.1953125 ns the full-current frequency is 20 MHz and
// the lowest non-zero code (one unit current) gives 1.25 MHz.
// The cells are analog, so this structure is simulated only; the tap
// logic itself is synthesizable. The 16:1 ratio of slow to fast cells and
// the 4+4 split of d[n] follow the document; the delay value that puts the
// top frequency at 20 MHz is derived from its frequency range.
`timescale 1ns/1ps
module segmented_dpwm #(
  parameter real T_FAST_NS = 0.1953125   // fast cell delay at full current
) (
  input  logic       rst_n,
  input  logic       en,
  input  logic       st,
  input  logic [7:0] duty,
  input  logic [4:0] bias,
  output logic       c,
  output logic       cycle_start
);

  logic [16:0] slow;   // slow[0] = ring input, slow[k] after k slow cells
  logic [16:0] fast;   // fast[0] = MUX-B output, fast[k] after k fast cells
  logic        latch_rst;

  for (genvar k = 0; k < 16; k++) begin : g_lines
    cs_delay_cell #(.T_FULL_NS(16.0 * T_FAST_NS)) u_slow (
      .in(slow[k]), .bias(bias), .out(slow[k+1]));
    cs_delay_cell #(.T_FULL_NS(T_FAST_NS)) u_fast (
      .in(fast[k]), .bias(bias), .out(fast[k+1]));
  end

  dpwm_tap_logic u_taps (
    .rst_n    (rst_n),
    .en       (en),
    .st       (st),
    .duty     (duty),
    .ring_end (slow[16]),
    .slow_tap (slow[15:0]),
    .fast_tap (fast[15:0]),
    .ring_in  (slow[0]),
    .fast_in  (fast[0]),
    .latch_rst(latch_rst),
    .c        (c)
  );

  assign cycle_start = slow[0];

endmodule
