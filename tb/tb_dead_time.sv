// Testbench of dead_time: in PWM mode the main-switch drive must rise
// dt_code * 0.5 ns after c(t) rises, the rectifier drive must fall with
// c(t) and rise dt_code * 0.5 ns after c(t) falls, and the two must never
// be on together. In PFM mode the main switch follows c(t) and the
// rectifier stays off.
`timescale 1ns/1ps
module tb_dead_time;
  import smps_pkg::*;
  logic       c = 1'b0;
  mode_e      mode = MODE_PWM;
  logic [3:0] dt_code = 4'd4;
  logic       gate_hs, gate_ls;
  int checks = 0, failures = 0, overlap = 0;
  realtime t_hs_r, t_ls_r, t_ls_f;

  dead_time dut (.*);

  always @(posedge gate_hs) t_hs_r = $realtime;
  always @(posedge gate_ls) t_ls_r = $realtime;
  always @(negedge gate_ls) t_ls_f = $realtime;
  always @(gate_hs or gate_ls) if (gate_hs && gate_ls) overlap++;

  task automatic near(input real got, input real exp, input string what);
    checks++;
    if (got - exp > 0.002 || exp - got > 0.002) begin
      failures++;
      $display("FAIL %s: %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime tr, tf;
    #20;
    foreach (codes[i]) begin
      dt_code = codes[i];
      #20 tr = $realtime; c = 1'b1;
      #20 tf = $realtime; c = 1'b0;
      #20;
      near(t_hs_r - tr, 0.5 * real'(codes[i]), "Q1 turn-on delay");
      near(t_ls_f - tr, 0.0, "Q2 turn-off");
      near(t_ls_r - tf, 0.5 * real'(codes[i]), "Q2 turn-on delay");
    end
    mode = MODE_PFM;
    #10 c = 1'b1;
    #1 checks++; if (gate_hs !== 1'b1 || gate_ls !== 1'b0) begin failures++; $display("FAIL PFM on"); end
    #10 c = 1'b0;
    #1 checks++; if (gate_hs !== 1'b0 || gate_ls !== 1'b0) begin failures++; $display("FAIL PFM off"); end
    checks++;
    if (overlap != 0) begin failures++; $display("FAIL shoot-through %0d", overlap); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] codes [4] = '{4'd4, 4'd1, 4'd9, 4'd15};
endmodule
