// Latch and encoder of the windowed delay-line ADC.
//
// On the rising edge of strobe (the reference pulse leaving its line) the
// nine thermometer taps of the input line are captured and turned into the
// signed error e[n] = (number of ones) - 5, limited to the window -4..+4:
// five ones means the input pulse passed as many cells as the reference
// pulse (e = 0), more ones a higher output voltage. Counting ones rather
// than finding the first zero tolerates a bubble in the code. The offset of
// five and the saturation of the all-zero code to -4 are this design's
// choice. e holds its value until the next strobe; it resets to 0.
`timescale 1ns/1ps
module adc_encoder
  import smps_pkg::*;
(
  input  logic       rst_n,
  input  logic       strobe,
  input  logic [8:0] taps,
  output err_t       e
);

  function automatic err_t encode(input logic [8:0] t);
    int ones;
    ones = $countones(t);
    if (ones == 0) return err_t'(E_MIN);
    return err_t'(ones - 5);
  endfunction

  always_ff @(posedge strobe or negedge rst_n) begin
    if (!rst_n) e <= '0;
    else        e <= encode(taps);
  end

endmodule
