// Testbench of adc_encoder: every thermometer code and some bubbled codes
// are latched on strobe and compared with e = ones - 5 limited to -4..4;
// the output must not change between strobes.
`timescale 1ns/1ps
module tb_adc_encoder;
  import smps_pkg::*;
  logic       rst_n = 1'b1, strobe = 1'b0;
  logic [8:0] taps = '0;
  err_t       e;
  initial #0.5 rst_n = 1'b0;  // a falling edge, so asynchronous resets act
  int checks = 0, failures = 0;

  adc_encoder dut (.*);

  task automatic conv(input logic [8:0] t, input int exp);
    taps = t;
    #1 strobe = 1'b1;
    #1 strobe = 1'b0;
    taps = ~t;
    #1;
    checks++;
    if (int'(e) != exp) begin
      failures++;
      $display("FAIL taps %b: e=%0d expected %0d", t, e, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    checks++;
    if (e != 0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1'b1;
    for (int k = 0; k <= 9; k++) begin
      automatic int exp = (k == 0) ? -4 : k - 5;
      conv(9'((1 << k) - 1), exp);
    end
    conv(9'b0_0001_1011, -1);   // bubble: four ones
    conv(9'b0_1110_1111, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
