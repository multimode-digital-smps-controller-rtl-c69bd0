// Testbench of segmented_dpwm. PWM mode (ring closed): after a start
// pulse, measures period and high time of c(t) for several duty words and
// two bias codes; the period must be 256 fast-cell delays (20 MHz at full
// bias) and the high time duty fast-cell delays, including the document's
// example 1110 1000 (duty ratio 0.906). PFM mode (ring open): each st pulse
// must give exactly one pulse of t_on fast-cell delays.
`timescale 1ns/1ps
module tb_segmented_dpwm;
  localparam real TF = 0.1953125;
  logic       rst_n = 1'b1, en = 1'b1, st = 1'b0;
  logic [7:0] duty = 8'd128;
  logic [4:0] bias = 5'h1F;
  logic       c, cycle_start;
  initial #0.5 rst_n = 1'b0;  // a falling edge, so asynchronous resets act
  int checks = 0, failures = 0;
  realtime t_r[$], t_f[$];
  int n_pulses = 0;

  segmented_dpwm dut (.*);

  always @(posedge c) begin t_r.push_back($realtime); n_pulses++; end
  always @(negedge c) t_f.push_back($realtime);

  task automatic near(input real got, input real exp, input real tol, input string what);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  task automatic kick();
    st = 1'b1; #0.05 st = 1'b0;
  endtask

  task automatic pwm_case(input logic [7:0] dw, input logic [4:0] b);
    real tf, per, hi;
    tf = TF * 16.0 / real'(b[0] + b[1] + 2*b[2] + 4*b[3] + 8*b[4]);
    duty = dw; bias = b;
    #(3.0 * 256.0 * tf);
    t_r.delete(); t_f.delete();
    #(3.0 * 256.0 * tf + 1.0);
    while (t_f.size() > 0 && t_f[0] < t_r[0]) void'(t_f.pop_front());
    per = t_r[2] - t_r[1];
    hi  = t_f[1] - t_r[1];
    near(per, 256.0 * tf, 0.005, $sformatf("period duty=%0d bias=%b", dw, b));
    near(hi, real'(dw) * tf, 0.005, $sformatf("high time duty=%0d bias=%b", dw, b));
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b1;
    #1 kick();
    pwm_case(8'b1110_1000, 5'h1F);
    near((t_f[1] - t_r[1]) / (t_r[2] - t_r[1]), 0.90625, 0.0005, "duty ratio of 1110 1000");
    pwm_case(8'b0001_0001, 5'h1F);
    pwm_case(8'd255, 5'h1F);
    pwm_case(8'd1, 5'h1F);
    pwm_case(8'd77, 5'h1F);
    pwm_case(8'd200, 5'b00001);
    pwm_case(8'd100, 5'b01010);
    // duty 0: no high time at all
    duty = 8'd0; bias = 5'h1F;
    #100 n_pulses = 0;
    #200;
    checks++;
    if (n_pulses != 0 || c !== 1'b0) begin
      failures++;
      $display("FAIL duty 0 gave pulses");
    end
    // PFM: open the ring, the circulating pulse dies
    en = 1'b0; duty = 8'd40;
    #200;
    n_pulses = 0;
    #200;
    checks++;
    if (n_pulses != 0) begin
      failures++;
      $display("FAIL open ring still oscillates");
    end
    for (int i = 0; i < 3; i++) begin
      t_r.delete(); t_f.delete(); n_pulses = 0;
      duty = 8'(40 + 60 * i);
      kick();
      #300;
      checks++;
      if (n_pulses != 1) begin
        failures++;
        $display("FAIL one-shot gave %0d pulses", n_pulses);
      end
      near(t_f[0] - t_r[0], real'(duty) * TF, 0.005, "PFM on-time");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
