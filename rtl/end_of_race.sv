// End-of-race (EoR) detector of the DPFM.
//
// A race is armed by the falling edge of c(t), the moment the second
// (reset) pulse is launched. From then on the first time all latch outputs
// of the race ring are zero the two pulses have met, and st is raised to
// start the next switching cycle through the DPWM delay line. st falls as
// soon as the new cycle sets the first ring latch again. The detector is
// disarmed, and st held low, while en = 0 (PWM mode) or in reset.
// The document gives the function (detect that all SR-latch outputs are
// zero and send st); the arming flip-flop clocked by c(t) is this design's
// choice, so that the empty ring before the first race is not taken as an
// end of race. Timing: st is combinational from q.
`timescale 1ns/1ps
module end_of_race #(
  parameter int N_STAGES = 64
) (
  input  logic                rst_n,
  input  logic                en,    // PFM mode
  input  logic                c,     // DPWM output
  input  logic [N_STAGES-1:0] q,     // race ring latch outputs
  output logic                st     // start of the next cycle
);

  logic armed;
  logic clr_n;

  assign clr_n = rst_n & en;

  always_ff @(negedge c or negedge clr_n) begin
    if (!clr_n) armed <= 1'b0;
    else        armed <= 1'b1;
  end

  assign st = en & armed & ~|q;

endmodule
