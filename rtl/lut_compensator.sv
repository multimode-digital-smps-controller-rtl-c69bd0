// Look-up-table based PID / PI compensator with two sets of tables.
//
// Clocked once per switching cycle by f_clk from the modulator. In PWM
// mode it evaluates the incremental PID law
//     d[n] = d[n-1] + a*e[n] + b*e[n-1] + c*e[n-2]
// with three tables LUT_A, LUT_B, LUT_C that hold the products a*e, b*e
// and c*e for the nine error values -4..+4, so no multiplier is needed.
// In PFM mode it evaluates the slow PI law
//     f_pf[n] = f_pf[n-1] + a_pf*e[n]
// with the single table LUT_PFM, and d[n] is held. The error history
// e[n-1], e[n-2] is updated in both modes.
// Both sums are kept with FRAC fractional bits and saturate at the ends of
// their range; d (D_W bits) and f_pf (FPF_W bits) are the integer parts.
// The table values are in units of 2^-FRAC output LSB; the defaults give
// a PI law (a = -27/256, b = +26/256, c = 0 for d, i.e. a proportional
// gain of 26/256 and an integral gain of 1/256 LSB per error step and
// cycle; a_pf = +2 for f_pf), signed
// so that a positive error (output above the reference) lowers the duty
// ratio and raises f_pf (longer race, lower PFM frequency). The laws and
// the table structure follow the document; widths, fractional bits, reset
// values and table contents are this design's choice.
// Timing: d and f_pf change on the clock edge, one cycle after e[n] is
// latched by the ADC.
`timescale 1ns/1ps
module lut_compensator
  import smps_pkg::*;
#(
  parameter int D_W    = 8,
  parameter int FPF_W  = 8,
  parameter int FRAC   = 8,
  parameter int LUT_A   [9] = '{108, 81, 54, 27, 0, -27, -54, -81, -108},
  parameter int LUT_B   [9] = '{-104, -78, -52, -26, 0, 26, 52, 78, 104},
  parameter int LUT_C   [9] = '{0, 0, 0, 0, 0, 0, 0, 0, 0},
  parameter int LUT_PFM [9] = '{-2048, -1536, -1024, -512, 0, 512, 1024, 1536, 2048},
  parameter int D_INIT   = 0,   // d after reset (integer LSBs)
  parameter int FPF_INIT = 0    // f_pf after reset (integer LSBs)
) (
  input  logic             clk,     // f_clk, one edge per switching cycle
  input  logic             rst_n,
  input  mode_e            mode,
  input  err_t             e,
  output logic [D_W-1:0]   d,
  output logic [FPF_W-1:0] f_pf
);

  localparam int DA_W  = D_W + FRAC;
  localparam int FA_W  = FPF_W + FRAC;
  localparam int D_MAX = (1 << DA_W) - 1;
  localparam int F_MAX = (1 << FA_W) - 1;

  logic [DA_W-1:0] d_acc;
  logic [FA_W-1:0] f_acc;
  err_t            e1, e2;

  function automatic int idx(input err_t v);
    int i;
    i = int'(v) - E_MIN;
    if (i < 0) i = 0;
    if (i > 8) i = 8;
    return i;
  endfunction

  function automatic int sat(input int v, input int hi);
    if (v < 0)  return 0;
    if (v > hi) return hi;
    return v;
  endfunction

  int d_next, f_next;

  always_comb begin
    d_next = sat(int'(d_acc) + LUT_A[idx(e)] + LUT_B[idx(e1)] + LUT_C[idx(e2)], D_MAX);
    f_next = sat(int'(f_acc) + LUT_PFM[idx(e)], F_MAX);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_acc <= DA_W'(D_INIT << FRAC);
      f_acc <= FA_W'(FPF_INIT << FRAC);
      e1    <= '0;
      e2    <= '0;
    end else begin
      if (mode == MODE_PWM) d_acc <= DA_W'(d_next);
      else                  f_acc <= FA_W'(f_next);
      e1 <= e;
      e2 <= e1;
    end
  end

  assign d    = d_acc[DA_W-1 -: D_W];
  assign f_pf = f_acc[FA_W-1 -: FPF_W];

endmodule
