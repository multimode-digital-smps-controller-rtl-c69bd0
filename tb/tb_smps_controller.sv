// End-to-end testbench of smps_controller, with every parameter at its
// default, regulating a 5 V to 3.3 V buck converter model (sense divider
// 1/2, reference code 512 = 1.65 V).
//  1. PWM at 20 MHz, 0.5 A load: the sigma-delta reference ramps up through
//     its filter (soft start) and the output must settle within 3 % of
//     3.3 V, at a switching period of 50 ns.
//  2. Switch to PFM at 10 mA: the synchronous rectifier turns off, the
//     DPWM becomes a one-shot (T_on = 80 slow-bias fast cells = 250 ns),
//     signal races set the period, and the output must stay within 5 %.
//  3. Switch back to PWM at 0.5 A and regulate again.
// Counted mechanisms (each must occur): PWM cycles, PFM cycles started by
// end of race, mode switches, dead-time intervals, discontinuous inductor
// current, ADC window saturation, d and f_pf updates.
`timescale 1ns/1ps
module tb_smps_controller;
  import smps_pkg::*;
  logic       rst_n = 1'b1, clk_sys = 1'b0, start = 1'b0;
  mode_e      mode = MODE_PWM;
  logic [9:0] vref_code = 10'd512;
  logic [4:0] dpwm_bias = 5'h1F;
  logic [7:0] t_on = 8'd80;
  logic [3:0] dt_code = 4'd2;
  real        v_sense, v_ref, v_out, i_l, i_load = 0.5;
  logic       gate_hs, gate_ls, c, f_clk, st;
  err_t       e;
  logic [7:0] d, f_pf;
  int         dcm_events;
  initial #0.5 rst_n = 1'b0;  // a falling edge, so asynchronous resets act
  int checks = 0, failures = 0;
  int n_pwm = 0, n_pfm = 0, n_switch = 0, n_dead = 0, n_sat = 0, n_dupd = 0, n_fupd = 0;
  realtime t_last_fclk, pwm_period;

  smps_controller dut (.*);
  buck_model plant (.gate_hs(gate_hs), .gate_ls(gate_ls), .i_load(i_load),
                    .v_out(v_out), .i_l(i_l), .dcm_events(dcm_events));

  assign v_sense = 0.5 * v_out;

  always #50 clk_sys = ~clk_sys;     // 10 MHz reference modulator clock

  always @(posedge f_clk) begin
    if (mode == MODE_PWM) begin
      n_pwm++;
      pwm_period = $realtime - t_last_fclk;
    end
    t_last_fclk = $realtime;
  end
  always @(posedge st) n_pfm++;
  always @(posedge gate_ls) if (!c) n_dead++;
  always @(posedge f_clk) if (e == 4 || e == -4) n_sat++;
  always @(d) n_dupd++;
  always @(f_pf) n_fupd++;

  task automatic kick();
    start = 1'b1; #0.05 start = 1'b0;
  endtask

  task automatic check_band(input real tol, input string what);
    real vmin, vmax;
    vmin = 100.0; vmax = -100.0;
    for (int i = 0; i < 200; i++) begin
      #50;
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
    #3000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20 rst_n = 1'b1;
    #10 kick();
    // 1. PWM, soft start through the reference filter
    #700000;
    check_band(0.03, "PWM 0.5 A");
    checks++;
    if (pwm_period < 49.99 || pwm_period > 50.01) begin
      failures++;
      $display("FAIL PWM period %f ns", pwm_period);
    end
    // 2. PFM at light load
    i_load = 0.01;
    mode = MODE_PFM; n_switch++;
    dpwm_bias = 5'b00001;
    #1 kick();
    #300000;
    check_band(0.05, "PFM 10 mA");
    // 3. back to PWM
    i_load = 0.5;
    mode = MODE_PWM; n_switch++;
    dpwm_bias = 5'h1F;
    #1 kick();
    #100000;
    check_band(0.03, "PWM again");
    $display("events: pwm=%0d pfm=%0d switch=%0d dead=%0d dcm=%0d sat=%0d dupd=%0d fupd=%0d",
             n_pwm, n_pfm, n_switch, n_dead, dcm_events, n_sat, n_dupd, n_fupd);
    if (n_pwm == 0)      begin failures++; $display("FAIL no PWM cycle"); end
    if (n_pfm == 0)      begin failures++; $display("FAIL no end of race"); end
    if (n_switch < 2)    begin failures++; $display("FAIL no mode switch"); end
    if (n_dead == 0)     begin failures++; $display("FAIL no dead time"); end
    if (dcm_events == 0) begin failures++; $display("FAIL no discontinuous conduction"); end
    if (n_sat == 0)      begin failures++; $display("FAIL ADC window never saturated"); end
    if (n_dupd == 0)     begin failures++; $display("FAIL d never updated"); end
    if (n_fupd == 0)     begin failures++; $display("FAIL f_pf never updated"); end
    checks += 8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
