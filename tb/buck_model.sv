// Behavioural model of the synchronous buck power stage used to close the
// loop around the controller in simulation (it is not part of the
// controller). Q1 connects the switch node to V_IN, Q2 to ground; with both
// off the inductor current flows through a body diode until it
// reaches zero and then stays at zero (discontinuous conduction). The
// inductor (with series resistance) and output capacitor (with ESR) are
// integrated with a fixed step of T_STEP_NS. The load is a current sink.
`timescale 1ns/1ps
module buck_model #(
  parameter real V_IN      = 5.0,
  parameter real L_H       = 1.0e-6,
  parameter real C_F       = 4.7e-6,
  parameter real R_L       = 0.1,
  parameter real R_ESR     = 0.02,
  parameter real T_STEP_NS = 0.2
) (
  input  logic gate_hs,
  input  logic gate_ls,
  input  real  i_load,
  output real  v_out,
  output real  i_l,
  output int   dcm_events    // number of times the inductor current ran dry
);
  real v_c;

  initial begin
    v_c = 0.0; i_l = 0.0; v_out = 0.0; dcm_events = 0;
    forever begin
      real v_sw, di, dt;
      #(T_STEP_NS);
      dt = T_STEP_NS * 1.0e-9;
      if (gate_hs)      v_sw = V_IN;
      else if (gate_ls) v_sw = 0.0;
      else if (i_l > 0.0) v_sw = -0.3;          // Q2 body diode
      else if (i_l < 0.0) v_sw = V_IN + 0.3;    // Q1 body diode
      else              v_sw = v_out;
      di = (v_sw - v_out - R_L * i_l) / L_H * dt;
      if (!gate_hs && !gate_ls && i_l != 0.0 && (i_l > 0.0) != (i_l + di > 0.0)) begin
        i_l = 0.0;                              // diode current ran dry
        dcm_events++;
      end else if (!gate_hs && !gate_ls && i_l == 0.0 && v_sw == v_out) begin
        i_l = 0.0;
      end else begin
        i_l = i_l + di;
      end
      v_c   = v_c + (i_l - i_load) / C_F * dt;
      v_out = v_c + R_ESR * (i_l - i_load);
    end
  end
endmodule
