// First-order sigma-delta modulator of the reference DAC.
//
// Each clock the N-bit reference code is added to an N-bit accumulator and
// the carry out is the output bit, so the density of ones in the bit
// stream equals code / 2^N. A low-pass filter outside the digital core
// turns the stream into the analog reference V_ref = V_FS * code / 2^N.
// The document only names a low-power, low-frequency sigma-delta DAC; the
// first-order error-feedback structure, the 10-bit width and the separate
// slow clock are this design's choice. Timing: bit_out is registered.
`timescale 1ns/1ps
module sd_dac #(
  parameter int N = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] code,
  output logic         bit_out
);

  logic [N-1:0] acc;
  logic [N:0]   sum;

  assign sum = {1'b0, acc} + {1'b0, code};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      bit_out <= 1'b0;
    end else begin
      acc     <= sum[N-1:0];
      bit_out <= sum[N];
    end
  end

endmodule
