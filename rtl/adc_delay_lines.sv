// Behavioural model of the two delay lines of the self-strobed windowed
// delay-line ADC.
//
// Each conversion starts on the rising edge of clk, which launches a pulse
// into both lines at once. The reference line (one slow cell and NF fast
// cells) is biased by V_ref, the input line (one slow cell and NF+4 fast
// cells) by the sensed output voltage. The cells are current starved, so
// their delay falls as their control voltage rises; the model uses
// delay = T_FAST_1V_NS / V for a fast cell and SLOW_RATIO times that for a
// slow cell. When the reference pulse leaves its line, strobe rises and
// the encoder latches taps, the outputs of the last nine fast cells of the
// input line (cells NF-4 .. NF+4, a thermometer code). Passing exactly NF
// input cells means zero error. One step is V_ref / (SLOW_RATIO + NF):
// with the defaults, 1/128 of V_ref (under 1 %), and the conversion ends
// within 30 ns for V_ref >= 1 V. The leading slow cell gives this
// resolution without a long fast line. taps and strobe clear at the next
// conversion start. NF, SLOW_RATIO and the 1/V law are this design's
// assumptions. Not synthesizable.
`timescale 1ns/1ps
module adc_delay_lines #(
  parameter int  NF           = 32,
  parameter real SLOW_RATIO   = 96.0,
  parameter real T_FAST_1V_NS = 0.234
) (
  input  logic       clk,      // conversion start
  input  real        v_in,     // sensed output voltage
  input  real        v_ref,    // reference voltage
  output logic [8:0] taps,     // input line, fast cells NF-4 .. NF+4
  output logic       strobe    // end of the reference line
);

  int unsigned conv_id;

  initial begin
    taps    = '0;
    strobe  = 1'b0;
    conv_id = 0;
  end

  function automatic real clamp_v(input real v);
    return (v < 0.05) ? 0.05 : v;
  endfunction

  always begin
    @(posedge clk);
    conv_id = conv_id + 1;
    taps    = '0;
    strobe  = 1'b0;
    fork
      begin
        automatic int unsigned id     = conv_id;
        automatic real         tf_in  = T_FAST_1V_NS / clamp_v(v_in);
        automatic real         tf_ref = T_FAST_1V_NS / clamp_v(v_ref);
        automatic real         t_ref  = (SLOW_RATIO + real'(NF)) * tf_ref;
        automatic real         now    = 0.0;
        for (int i = 0; i < 9; i++) begin
          automatic real t_tap = (SLOW_RATIO + real'(NF - 4 + i)) * tf_in;
          if (t_tap >= t_ref) break;
          #(t_tap - now);
          now = t_tap;
          if (id != conv_id) break;
          taps[i] = 1'b1;
        end
        if (id == conv_id) begin
          #(t_ref - now);
          if (id == conv_id) strobe = 1'b1;
        end
      end
    join_none
  end

endmodule
