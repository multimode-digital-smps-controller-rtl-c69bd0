// Testbench of lut_compensator: drives random error sequences and mode
// changes and compares d[n] and f_pf[n] every cycle with a reference model
// that evaluates the control laws directly from the gains
// (a = -27/256, b = 26/256, c = 0, a_pf = 2, in real arithmetic, with the
// same saturation), so the tables are checked against the laws they
// stand for. Also checks that d holds in PFM and f_pf holds in PWM, that
// both saturate, and that an update happens on every clock edge.
`timescale 1ns/1ps
module tb_lut_compensator;
  import smps_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b1;
  mode_e      mode = MODE_PWM;
  err_t       e = '0;
  logic [7:0] d, f_pf;
  initial #0.5 rst_n = 1'b0;  // a falling edge, so asynchronous resets act
  int checks = 0, failures = 0;
  int sat_hi = 0, sat_lo = 0;

  lut_compensator dut (.*);

  real md, mf;        // model accumulators in output LSBs
  int  me1, me2;

  always #5 clk = ~clk;

  task automatic step(input int ev, input mode_e m);
    real dn, fn;
    @(negedge clk);
    e = err_t'(ev); mode = m;
    @(posedge clk);
    if (m == MODE_PWM) begin
      dn = md + (-27.0 / 256.0) * ev + (26.0 / 256.0) * me1 + 0.0 * me2;
      if (dn < 0.0) dn = 0.0;
      if (dn > 256.0 - 1.0/256.0) dn = 256.0 - 1.0/256.0;
      md = dn;
    end else begin
      fn = mf + 2.0 * ev;
      if (fn < 0.0) fn = 0.0;
      if (fn > 256.0 - 1.0/256.0) fn = 256.0 - 1.0/256.0;
      mf = fn;
    end
    me2 = me1; me1 = ev;
    #1;
    if (md == 0.0 || mf == 0.0) sat_lo++;
    if (md > 255.9 || mf > 255.9) sat_hi++;
    checks++;
    if (int'(d) != $rtoi($floor(md)) || int'(f_pf) != $rtoi($floor(mf))) begin
      failures++;
      $display("FAIL e=%0d mode=%0d d=%0d (model %f) f_pf=%0d (model %f)",
               ev, m, d, md, f_pf, mf);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    md = 0.0; mf = 0.0; me1 = 0; me2 = 0;
    #12 rst_n = 1'b1;
    // drive d upward to saturation with negative errors
    repeat (3000) step(-4, MODE_PWM);
    repeat (400) step(2, MODE_PWM);
    for (int i = 0; i < 2000; i++) begin
      automatic int    ev = int'($urandom_range(8)) - 4;
      automatic mode_e m  = ($urandom_range(9) < 3) ? MODE_PFM : MODE_PWM;
      step(ev, m);
    end
    repeat (600) step(4, MODE_PFM);
    repeat (600) step(-4, MODE_PFM);
    repeat (300) step(3, MODE_PWM);
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin
      failures++;
      $display("FAIL saturation not exercised (%0d/%0d)", sat_hi, sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
