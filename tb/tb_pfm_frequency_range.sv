// Workload test of the pulse-frequency modulator: the DPWM used as a
// one-shot delay line, the race ring and the end-of-race detector, closed
// into the free-running PFM loop with a fixed on-time of t_on = 160 fast
// cells at the lowest DPWM bias (500 ns). The five-bit frequency code is
// swept; the switching frequency must fall monotonically with the code and
// span 20 kHz (within 5 %) to 250 kHz, the range the modulator is meant
// to cover. A
// sudden change of the code must change the period from the next cycle on.
// The on-time must stay 500 ns at every code.
`timescale 1ns/1ps
module tb_pfm_frequency_range;
  localparam int N = 64;
  logic         rst_n = 1'b1, start = 1'b0;
  logic [4:0]   code = '0;
  logic         c, cyc, st;
  logic [N-1:0] q;
  int checks = 0, failures = 0;
  realtime t_rise[$], t_fall[$];
  int n_rise = 0;

  initial #0.5 rst_n = 1'b0;

  segmented_dpwm u_dpwm (.rst_n(rst_n), .en(1'b0), .st(st | start), .duty(8'd160),
                         .bias(5'b00001), .c(c), .cycle_start(cyc));
  dpfm_race_ring #(.N_STAGES(N)) u_race (.en(1'b1), .c(c), .bias(code), .q(q));
  end_of_race #(.N_STAGES(N)) u_eor (.rst_n(rst_n), .en(1'b1), .c(c), .q(q), .st(st));

  always @(posedge c) begin t_rise.push_back($realtime); n_rise++; end
  always @(negedge c) t_fall.push_back($realtime);

  function automatic real period_now();
    int n = t_rise.size();
    return t_rise[n-1] - t_rise[n-2];
  endfunction

  task automatic measure(input logic [4:0] cd, output real per);
    code = cd;
    // let the code take effect, then wait for three more cycles
    begin
      int n0 = n_rise;
      wait (n_rise >= n0 + 3);
    end
    per = period_now();
    checks++;
    if (t_fall[t_fall.size()-1] - t_rise[t_rise.size()-2] < 499.9 ||
        t_fall[t_fall.size()-1] - t_rise[t_rise.size()-2] > 500.1) begin
      failures++;
      $display("FAIL on-time %f ns", t_fall[t_fall.size()-1] - t_rise[t_rise.size()-2]);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real per, prev, f_hi, f_lo;
    #1 rst_n = 1'b1;
    #1 start = 1'b1; #0.05 start = 1'b0;
    prev = 0.0;
    foreach (codes[i]) begin
      measure(codes[i], per);
      $display("code %2d: period %9.1f ns, %8.1f kHz", codes[i], per, 1.0e6 / per);
      checks++;
      if (!(per > prev)) begin
        failures++;
        $display("FAIL period not increasing with the code");
      end
      if (i == 0) f_hi = 1.0e6 / per;
      f_lo = 1.0e6 / per;
      prev = per;
    end
    checks++;
    if (f_hi < 250.0 || f_lo > 21.0) begin
      failures++;
      $display("FAIL range %f kHz .. %f kHz does not cover 20..250 kHz", f_lo, f_hi);
    end
    // sudden change of the control input
    code = 5'd31;
    wait (n_rise > 0);
    begin
      automatic int n0 = n_rise;
      real p_before, p_after;
      wait (n_rise >= n0 + 2);
      p_before = period_now();
      code = 5'd4;
      wait (n_rise >= n0 + 4);
      p_after = period_now();
      checks++;
      if (!(p_after < 0.2 * p_before)) begin
        failures++;
        $display("FAIL step response: %f ns -> %f ns", p_before, p_after);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [4:0] codes [7] = '{5'd0, 5'd4, 5'd8, 5'd16, 5'd24, 5'd28, 5'd31};
endmodule
