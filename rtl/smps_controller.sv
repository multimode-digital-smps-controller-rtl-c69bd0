// Multimode digital controller for a low-power synchronous buck converter.
//
// Signal flow, once per switching cycle:
//   sd_dac + dac_filter   : reference V_ref from a 10-bit code
//   adc_delay_lines       : V_sense vs V_ref, started by f_clk
//   adc_encoder           : error e[n] in -4..+4
//   lut_compensator       : d[n] (PWM, PID tables) or f_pf[n] (PFM, PI table)
//   segmented_dpwm        : c(t); in PWM a free-running ring at constant
//                           frequency, in PFM a delay line making a T_on pulse
//   dpfm_race_ring +      : in PFM the T_on pulse starts a signal race whose
//   end_of_race             length, set by f_pf[n], is the off time; its end
//                           (st) starts the next cycle
//   dead_time             : gate drives for Q1 and Q2
// mode = 0 selects PWM (ring closed, synchronous rectifier active, duty
// d[n]); mode = 1 selects PFM (ring open, Q2 off, pulse width t_on[n],
// frequency from the five MSBs of f_pf[n]). The ADC and the compensator are
// clocked by f_clk, the start of each switching cycle, so they consume
// power in proportion to the switching frequency.
// start must be pulsed (a few tens of ps, shorter than one fast DPWM
// cell) after reset and after each mode change: it launches the pulse
// that circulates in the PWM ring or the first PFM cycle. dpwm_bias sets
// the PWM frequency (20 MHz at 5'h1F down to 1.25 MHz at one unit current)
// and the T_on scale in PFM. The structure follows the document's block
// diagram; the start input and the widths of the programming inputs are
// this design's choice. Analog parts are behavioural models, so the top is
// for simulation; the digital blocks inside are synthesizable.
`timescale 1ns/1ps
module smps_controller
  import smps_pkg::*;
#(
  parameter int N_RACE = 64       // stages of the DPFM race ring
) (
  input  logic       rst_n,
  input  logic       clk_sys,     // slow clock of the sigma-delta DAC
  input  mode_e      mode,
  input  logic       start,
  input  logic [9:0] vref_code,   // V_ref = 3.3 V * vref_code / 1024
  input  logic [4:0] dpwm_bias,   // DPWM cell current code
  input  logic [7:0] t_on,        // PFM on-time, in fast DPWM cells
  input  logic [3:0] dt_code,     // dead time, in 0.5 ns steps
  input  real        v_sense,     // sensed output voltage
  output logic       gate_hs,     // Q1 drive
  output logic       gate_ls,     // Q2 drive
  output logic       c,           // modulator output c(t)
  output logic       f_clk,       // start of each switching cycle
  output logic       st,          // end of race (PFM cycle start)
  output err_t       e,           // ADC error e[n]
  output logic [7:0] d,           // duty command d[n]
  output logic [7:0] f_pf,        // PFM frequency command f_pf[n]
  output real        v_ref        // reconstructed reference
);

  logic              dac_bit;
  logic [8:0]        adc_taps;
  logic              adc_strobe;
  logic [7:0]        duty;
  logic [N_RACE-1:0] race_q;
  logic              st_eor;
  logic              pwm_en;
  logic              pfm_en;

  assign pwm_en = (mode == MODE_PWM);
  assign pfm_en = (mode == MODE_PFM);

  sd_dac #(.N(10)) u_dac (
    .clk(clk_sys), .rst_n(rst_n), .code(vref_code), .bit_out(dac_bit));

  dac_filter u_dac_filter (.bit_in(dac_bit), .v_ref(v_ref));

  adc_delay_lines u_adc_lines (
    .clk(f_clk), .v_in(v_sense), .v_ref(v_ref),
    .taps(adc_taps), .strobe(adc_strobe));

  adc_encoder u_adc_enc (
    .rst_n(rst_n), .strobe(adc_strobe), .taps(adc_taps), .e(e));

  lut_compensator u_comp (
    .clk(f_clk), .rst_n(rst_n), .mode(mode), .e(e), .d(d), .f_pf(f_pf));

  assign duty = pfm_en ? t_on : d;
  assign st   = st_eor;

  segmented_dpwm u_dpwm (
    .rst_n(rst_n), .en(pwm_en), .st(st_eor | start), .duty(duty),
    .bias(dpwm_bias), .c(c), .cycle_start(f_clk));

  dpfm_race_ring #(.N_STAGES(N_RACE)) u_race (
    .en(pfm_en), .c(c), .bias(f_pf[7:3]), .q(race_q));

  end_of_race #(.N_STAGES(N_RACE)) u_eor (
    .rst_n(rst_n), .en(pfm_en), .c(c), .q(race_q), .st(st_eor));

  dead_time u_dt (
    .c(c), .mode(mode), .dt_code(dt_code), .gate_hs(gate_hs), .gate_ls(gate_ls));

endmodule
