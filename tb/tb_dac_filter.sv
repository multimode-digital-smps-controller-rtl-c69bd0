// Testbench of dac_filter together with sd_dac: the filtered reference
// must settle to 3.3 V * code / 1024 within a few millivolts, and follow a
// code change.
`timescale 1ns/1ps
module tb_dac_filter;
  logic       clk = 1'b0, rst_n = 1'b1;
  logic [9:0] code = 10'd512;
  logic       bit_s;
  real        v_ref;
  initial #0.5 rst_n = 1'b0;  // a falling edge, so asynchronous resets act
  int checks = 0, failures = 0;

  sd_dac #(.N(10)) mod (.clk(clk), .rst_n(rst_n), .code(code), .bit_out(bit_s));
  dac_filter #(.TAU_NS(2000.0)) dut (.bit_in(bit_s), .v_ref(v_ref));

  always #50 clk = ~clk;

  task automatic settle(input int cd);
    real target;
    code = 10'(cd);
    target = 3.3 * real'(cd) / 1024.0;
    #20000;
    for (int i = 0; i < 5; i++) begin
      #137;
      checks++;
      if (v_ref - target > 0.2 || target - v_ref > 0.2) begin
        failures++;
        $display("FAIL code %0d: v_ref %f target %f", cd, v_ref, target);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100 rst_n = 1'b1;
    settle(512); settle(310); settle(775); settle(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
