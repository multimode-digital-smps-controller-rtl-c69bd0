// Testbench of sd_dac: for several codes the number of ones in 1024
// consecutive output bits must equal the code exactly (first-order
// modulator from a cleared accumulator), and no run of ones or zeros may
// be longer than the code density allows.
`timescale 1ns/1ps
module tb_sd_dac;
  logic       clk = 1'b0, rst_n = 1'b1;
  logic [9:0] code = '0;
  logic       bit_out;
  initial #0.5 rst_n = 1'b0;  // a falling edge, so asynchronous resets act
  int checks = 0, failures = 0;

  sd_dac #(.N(10)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(input int cd);
    int ones, run_len, max_run;
    rst_n = 1'b0; code = 10'(cd);
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);      // first bit appears after one clock
    ones = 0; run_len = 0; max_run = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      ones += int'(bit_out);
      if (bit_out == (cd >= 512)) run_len = 0;
      else begin run_len++; if (run_len > max_run) max_run = run_len; end
    end
    checks++;
    if (ones != cd) begin
      failures++;
      $display("FAIL code %0d: %0d ones in 1024 bits", cd, ones);
    end
    checks++;
    if (cd != 0 && cd != 512 && max_run > 1 + 1024 / ((cd < 512) ? cd : 1024 - cd)) begin
      failures++;
      $display("FAIL code %0d: run of %0d", cd, max_run);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run(0); run(1); run(3); run(256); run(512); run(513); run(700); run(1023);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
