// Testbench of end_of_race: st must stay low before the first falling
// edge of c(t), in reset and in PWM mode, must stay low while any ring
// latch is set, and must rise once all latches are zero after a race.
`timescale 1ns/1ps
module tb_end_of_race;
  localparam int N = 8;
  logic         rst_n = 1'b1, en = 1'b1, c = 1'b0;
  logic [N-1:0] q = '0;
  logic         st;
  initial #0.5 rst_n = 1'b0;  // a falling edge, so asynchronous resets act
  int checks = 0, failures = 0;

  end_of_race #(.N_STAGES(N)) dut (.*);

  task automatic chk(input logic exp, input string what);
    #0.1;
    checks++;
    if (st !== exp) begin
      failures++;
      $display("FAIL %s: st=%b", what, st);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 chk(1'b0, "in reset");
    rst_n = 1'b1;
    chk(1'b0, "not armed before a race");
    for (int r = 0; r < 4; r++) begin
      c = 1'b1; q[0] = 1'b1;
      chk(1'b0, "during on-time");
      q = 8'b0000_0111;
      c = 1'b0;
      chk(1'b0, "latches still set");
      q = 8'b0000_0110; chk(1'b0, "reset pulse passing");
      q = 8'b0000_0100; chk(1'b0, "one latch left");
      q = 8'b0000_0000; chk(1'b1, "end of race");
      q[0] = 1'b1; chk(1'b0, "next cycle started");
      q = '0;
    end
    c = 1'b1; #1 c = 1'b0;
    en = 1'b0;
    chk(1'b0, "PWM mode");
    en = 1'b1;
    chk(1'b0, "disarmed by PWM mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
