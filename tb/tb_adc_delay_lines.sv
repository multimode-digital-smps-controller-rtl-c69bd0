// Testbench of adc_delay_lines with adc_encoder: sweeps the input voltage
// around several reference voltages and compares the latched error with
// e = floor(128 * v_in / v_ref) - 128 limited to -4..4 (one step is
// v_ref / 128, under 1 % of v_ref); checks that the strobe comes within
// 30 ns for references of 1 V and above.
`timescale 1ns/1ps
module tb_adc_delay_lines;
  import smps_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b1;
  real        v_in = 1.0, v_ref = 1.0;
  logic [8:0] taps;
  logic       strobe;
  err_t       e;
  initial #0.5 rst_n = 1'b0;  // a falling edge, so asynchronous resets act
  int checks = 0, failures = 0;
  realtime t_start, t_strobe;

  adc_delay_lines dut (.*);
  adc_encoder enc (.rst_n(rst_n), .strobe(strobe), .taps(taps), .e(e));

  always @(posedge strobe) t_strobe = $realtime;

  task automatic conv(input real vr, input real vi);
    int k, exp;
    v_ref = vr; v_in = vi;
    t_start = $realtime;
    clk = 1'b1; #1 clk = 1'b0;
    #60;
    k = $rtoi($floor(128.0 * vi / vr + 1e-9)) - 96 - 32;
    exp = (k > 4) ? 4 : (k < -4) ? -4 : k;
    checks++;
    if (int'(e) != exp) begin
      failures++;
      $display("FAIL vref=%f vin=%f e=%0d expected %0d", vr, vi, e, exp);
    end
    if (vr >= 1.0) begin
      checks++;
      if (t_strobe - t_start > 30.0) begin
        failures++;
        $display("FAIL conversion took %f ns", t_strobe - t_start);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b1;
    foreach (v_list[i]) begin
      for (int s = -6; s <= 6; s++)
        conv(v_list[i], v_list[i] * (1.0 + (real'(s) + 0.5) / 128.0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real v_list [4] = '{1.0, 1.65, 2.0, 2.5};
endmodule
