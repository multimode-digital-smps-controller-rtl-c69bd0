// Closed-loop workload test of smps_controller (defaults) with the buck
// model, reproducing the two regulation experiments the controller is
// demonstrated with:
//  A. PWM with the DPWM slowed to 6.25 MHz (bias weight 5 of 16, the
//     setting nearest to 6 MHz) at 0.9 A, about 3 W at 3.3 V: the output
//     must settle within 3 % of 3.3 V at a 160 ns switching period.
//  B. PFM with T_on = 29 fast cells at the lowest DPWM bias (91 ns) and a
//     load step from 1 mA to 2 mA: the output must stay within 5 % of
//     3.3 V and the PFM frequency must rise after the step.
`timescale 1ns/1ps
module tb_closed_loop_workloads;
  import smps_pkg::*;
  logic       rst_n = 1'b1, clk_sys = 1'b0, start = 1'b0;
  mode_e      mode = MODE_PWM;
  logic [9:0] vref_code = 10'd512;
  logic [4:0] dpwm_bias = 5'b01001;
  logic [7:0] t_on = 8'd29;
  logic [3:0] dt_code = 4'd4;
  real        v_sense, v_ref, v_out, i_l, i_load = 0.9;
  logic       gate_hs, gate_ls, c, f_clk, st;
  err_t       e;
  logic [7:0] d, f_pf;
  int         dcm_events;
  int checks = 0, failures = 0;
  int n_st = 0;
  realtime t_last, period;

  initial #0.5 rst_n = 1'b0;

  smps_controller dut (.*);
  buck_model plant (.gate_hs(gate_hs), .gate_ls(gate_ls), .i_load(i_load),
                    .v_out(v_out), .i_l(i_l), .dcm_events(dcm_events));

  assign v_sense = 0.5 * v_out;
  always #50 clk_sys = ~clk_sys;

  always @(posedge f_clk) begin
    period = $realtime - t_last;
    t_last = $realtime;
  end
  always @(posedge st) n_st++;

  task automatic kick();
    start = 1'b1; #0.05 start = 1'b0;
  endtask

  task automatic check_band(input real tol, input real span_ns, input string what);
    real vmin, vmax;
    vmin = 100.0; vmax = -100.0;
    for (int i = 0; i < 200; i++) begin
      #(span_ns / 200.0);
      if (v_out < vmin) vmin = v_out;
      if (v_out > vmax) vmax = v_out;
    end
    $display("%s: v_out %f .. %f  d=%0d f_pf=%0d", what, vmin, vmax, d, f_pf);
    checks++;
    if (vmin < 3.3 * (1.0 - tol) || vmax > 3.3 * (1.0 + tol)) begin
      failures++;
      $display("FAIL %s: output left the %0.0f %% band", what, tol * 100.0);
    end
  endtask

  initial begin
    #8000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real f1, f2;
    int n0;
    #20 rst_n = 1'b1;
    #10 kick();
    // A. PWM at 6.25 MHz, 0.9 A
    #2500000;
    check_band(0.03, 20000.0, "PWM 6.25 MHz 0.9 A");
    checks++;
    if (period < 159.99 || period > 160.01) begin
      failures++;
      $display("FAIL PWM period %f ns", period);
    end
    // B. PFM, 1 mA then 2 mA
    i_load = 0.001;
    mode = MODE_PFM;
    dpwm_bias = 5'b00001;
    #1 kick();
    #1500000;
    check_band(0.05, 100000.0, "PFM 1 mA");
    n0 = n_st; #200000; f1 = real'(n_st - n0) / 200.0;
    i_load = 0.002;
    #500000;
    check_band(0.05, 100000.0, "PFM 2 mA");
    n0 = n_st; #200000; f2 = real'(n_st - n0) / 200.0;
    $display("PFM frequency: %0.1f kHz at 1 mA, %0.1f kHz at 2 mA", f1 * 1000.0, f2 * 1000.0);
    checks++;
    if (!(f2 > f1 * 1.3)) begin
      failures++;
      $display("FAIL PFM frequency did not follow the load step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
