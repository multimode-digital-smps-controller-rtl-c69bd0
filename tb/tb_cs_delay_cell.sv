// Testbench of cs_delay_cell: sends short pulses through one cell at
// several bias codes and checks that both edges come out after
// T_FULL * 16 / weight, that a pulse shorter than the delay survives, and
// that a starved cell (code 0) holds its output.
`timescale 1ns/1ps
module tb_cs_delay_cell;
  logic       in_s = 1'b0;
  logic [4:0] bias = 5'h1F;
  logic       out_s;
  int checks = 0, failures = 0;
  realtime t_in, t_rise, t_fall;

  cs_delay_cell #(.T_FULL_NS(0.2)) dut (.in(in_s), .bias(bias), .out(out_s));

  always @(posedge out_s) t_rise = $realtime;
  always @(negedge out_s) t_fall = $realtime;

  function automatic real wt(input logic [4:0] b);
    return real'(b[0] + b[1] + 2*b[2] + 4*b[3] + 8*b[4]);
  endfunction

  task automatic check_code(input logic [4:0] code);
    real expd;
    bias = code;
    expd = 0.2 * 16.0 / wt(code);
    #1;
    t_in = $realtime;
    in_s = 1'b1;
    #0.05 in_s = 1'b0;
    #(expd + 1.0);
    checks++;
    if ((t_rise - t_in - expd) > 0.002 || (t_rise - t_in - expd) < -0.002) begin
      failures++;
      $display("FAIL code %b rise delay %f expected %f", code, t_rise - t_in, expd);
    end
    checks++;
    if ((t_fall - t_rise) > 0.052 || (t_fall - t_rise) < 0.048) begin
      failures++;
      $display("FAIL code %b pulse width %f", code, t_fall - t_rise);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_code(5'b11111);
    check_code(5'b00001);
    check_code(5'b00010);
    check_code(5'b00100);
    check_code(5'b10000);
    check_code(5'b01011);
    // starved cell: no output edge
    bias = 5'b00000;
    t_rise = 0.0;
    #1 in_s = 1'b1;
    #0.05 in_s = 1'b0;
    #20;
    checks++;
    if (out_s !== 1'b0 || t_rise != 0.0) begin
      failures++;
      $display("FAIL starved cell produced an edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
