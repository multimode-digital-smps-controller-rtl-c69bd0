// Testbench of dpfm_race_ring: applies an on-time pulse on c(t) for
// several bias codes and on-times and checks that the ring empties (all
// latch outputs zero) when the reset pulse catches the set pulse, at the
// time given by the closed form: after T_on + latch delay + k*di with k
// the first stage index for which k*(ds-di) > T_on - ds. Also checks that
// a higher bias code (faster set path) lengthens the race and that leaving
// PFM clears the ring.
`timescale 1ns/1ps
module tb_dpfm_race_ring;
  localparam int  N   = 64;
  localparam real TCS = 10.0, TINV = 9.95, TL = 0.05;
  logic         en = 1'b1, c = 1'b0;
  logic [4:0]   bias = '0;
  logic [N-1:0] q;
  int checks = 0, failures = 0;
  realtime t0, t_empty;
  real last_len;

  dpfm_race_ring #(.N_STAGES(N)) dut (.*);

  function automatic real ds_of(input logic [4:0] b);
    return TCS * 80.0 / real'(64 + b[0] + b[1] + 2*b[2] + 4*b[3] + 8*b[4]);
  endfunction

  task automatic race(input real ton, input logic [4:0] b, output real len);
    real ds, expd;
    int k;
    bias = b;
    ds = ds_of(b);
    k = 0;
    while (real'(k) * (ds - TINV) <= ton - ds) k++;
    expd = ton + TL + real'(k) * TINV;
    t0 = $realtime;
    c = 1'b1;
    #(ton) c = 1'b0;
    #0.01;
    checks++;
    if (q == '0) begin
      failures++;
      $display("FAIL ring empty right after the on-time");
    end
    wait (q == '0);
    t_empty = $realtime;
    len = t_empty - t0;
    checks++;
    if (len - expd > 0.01 || expd - len > 0.01) begin
      failures++;
      $display("FAIL race ton=%f bias=%b lasted %f expected %f", ton, b, len, expd);
    end
    #50;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real len;
    #10;
    race(300.33, 5'd0, len);
    last_len = len;
    race(300.33, 5'b00100, len);
    checks++;
    if (!(len > last_len)) begin
      failures++;
      $display("FAIL higher bias should lengthen the race");
    end
    last_len = len;
    race(300.33, 5'b11111, len);
    checks++;
    if (!(len > last_len)) begin
      failures++;
      $display("FAIL full bias should give the longest race");
    end
    race(100.72, 5'b11111, len);
    race(500.23, 5'b01000, len);
    // abort by leaving PFM
    c = 1'b1; #300 c = 1'b0; #100;
    en = 1'b0; #1;
    checks++;
    if (q != '0) begin
      failures++;
      $display("FAIL ring not cleared when leaving PFM");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
