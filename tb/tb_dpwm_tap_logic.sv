// Testbench of dpwm_tap_logic: checks the two multiplexers for every
// address, the ring-closing gate in both modes, and the SR latch (set by
// the ring input, reset by the MUX-A output, reset dominant).
`timescale 1ns/1ps
module tb_dpwm_tap_logic;
  logic        rst_n = 1'b1, en = 1'b1, st = 1'b0, ring_end = 1'b0;
  logic [7:0]  duty = '0;
  logic [15:0] slow_tap = '0, fast_tap = '0;
  logic        ring_in, fast_in, latch_rst, c;
  initial #0.5 rst_n = 1'b0;  // a falling edge, so asynchronous resets act
  int checks = 0, failures = 0;

  dpwm_tap_logic dut (.*);

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
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
    #1 chk(c, 1'b0, "latch after reset");
    // multiplexers
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        duty = 8'((a << 4) | b);
        slow_tap = 16'(1 << a);
        fast_tap = 16'(1 << ((b + 3) % 16));
        #0.1;
        chk(fast_in, 1'b1, "MUX-B selects its tap");
        chk(latch_rst, 1'b0, "MUX-A ignores other taps");
        fast_tap = 16'(1 << b);
        slow_tap = 16'(1 << ((a + 5) % 16));
        #0.1;
        chk(fast_in, 1'b0, "MUX-B ignores other taps");
        chk(latch_rst, 1'b1, "MUX-A selects its tap");
      end
    end
    slow_tap = '0; fast_tap = '0;
    // ring closing
    en = 1'b1; ring_end = 1'b1; #0.1 chk(ring_in, 1'b1, "ring closed in PWM");
    en = 1'b0; #0.1 chk(ring_in, 1'b0, "ring open in PFM");
    st = 1'b1; #0.1 chk(ring_in, 1'b1, "st launches a pulse");
    st = 1'b0; ring_end = 1'b0;
    // SR latch
    duty = 8'h35;
    #0.1 st = 1'b1; #0.05 st = 1'b0;
    #0.1 chk(c, 1'b1, "latch set by ring input");
    #1   chk(c, 1'b1, "latch holds high");
    fast_tap[5] = 1'b1; #0.05 fast_tap[5] = 1'b0;
    #0.1 chk(c, 1'b0, "latch reset by MUX-A");
    fast_tap[4] = 1'b1; st = 1'b1; #0.05 fast_tap[4] = 1'b0; st = 1'b0;
    #0.1 chk(c, 1'b1, "unselected tap does not reset");
    fast_tap[5] = 1'b1; st = 1'b1; #0.05 fast_tap[5] = 1'b0; st = 1'b0;
    #0.1 chk(c, 1'b0, "reset dominates set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
