// avs_controller: closed-loop supply-voltage / clock-frequency regulator driven
// by the timing pre-error flag of the multi-bit flip-flops.
//
// At every window_done from the error monitor the controller takes one step:
//   * timing_err set   -> back off: raise the supply code by VDD_STEP_MV
//                         (voltage mode) or lengthen the clock period code by
//                         PERIOD_STEP_PS (frequency mode);
//   * timing_err clear -> tighten: lower the supply, or shorten the period.
// The codes saturate at their limits; the supply floor of 800 mV is where the
// memories stop working. The loop therefore settles, dithering by one step,
// at the lowest supply (or shortest period) at which timing pre-errors just
// start to appear - where the flip-flops still capture correctly because the
// pre-error window lies before their real failure point.
// vdd_mv and period_ps are codes for an external regulator and clock source;
// the one that is not being regulated stays where it was.
//
// Interface: clk, rst_n, enable, mode (rad_pkg::reg_mode_e), window_done,
// timing_err in; vdd_mv, period_ps, step_up, step_down, at_limit out.
// Timing: codes change on the clock edge after window_done; step_up and
// step_down pulse for one cycle with that change.
//
// From the design description: the feedback principle, 1 mV steps, the 1.2 V
// start, the 0.8 V floor and the 75 MHz start frequency. This design's own
// choices: single steps in both directions, the upper supply limit and the
// period limits and step.
module avs_controller
  import rad_pkg::*;
#(
  parameter int unsigned VDD_INIT_MV    = 1200,
  parameter int unsigned VDD_MIN_MV     = 800,
  parameter int unsigned VDD_MAX_MV     = 1320,
  parameter int unsigned VDD_STEP_MV    = 1,
  parameter int unsigned PERIOD_INIT_PS = 13333,
  parameter int unsigned PERIOD_MIN_PS  = 5000,
  parameter int unsigned PERIOD_MAX_PS  = 1000000,
  parameter int unsigned PERIOD_STEP_PS = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  reg_mode_e   mode,
  input  logic        window_done,
  input  logic        timing_err,
  output logic [11:0] vdd_mv,
  output logic [19:0] period_ps,
  output logic        step_up,
  output logic        step_down,
  output logic        at_limit
);
  timeunit 1ps; timeprecision 1ps;

  logic [11:0] vdd_up, vdd_dn;
  logic [19:0] per_up, per_dn;

  // Saturating next values.
  always_comb begin
    vdd_up = (int'(vdd_mv) + VDD_STEP_MV > VDD_MAX_MV) ? 12'(VDD_MAX_MV) : vdd_mv + 12'(VDD_STEP_MV);
    vdd_dn = (int'(vdd_mv) < VDD_MIN_MV + VDD_STEP_MV) ? 12'(VDD_MIN_MV) : vdd_mv - 12'(VDD_STEP_MV);
    per_up = (int'(period_ps) + PERIOD_STEP_PS > PERIOD_MAX_PS) ? 20'(PERIOD_MAX_PS) : period_ps + 20'(PERIOD_STEP_PS);
    per_dn = (int'(period_ps) < PERIOD_MIN_PS + PERIOD_STEP_PS) ? 20'(PERIOD_MIN_PS) : period_ps - 20'(PERIOD_STEP_PS);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vdd_mv    <= 12'(VDD_INIT_MV);
      period_ps <= 20'(PERIOD_INIT_PS);
      step_up   <= 1'b0;
      step_down <= 1'b0;
      at_limit  <= 1'b0;
    end else begin
      step_up   <= 1'b0;
      step_down <= 1'b0;
      if (enable && window_done) begin
        step_up   <= timing_err;
        step_down <= !timing_err;
        if (mode == REG_VOLTAGE) begin
          vdd_mv   <= timing_err ? vdd_up : vdd_dn;
          at_limit <= timing_err ? (vdd_up == vdd_mv) : (vdd_dn == vdd_mv);
        end else begin
          period_ps <= timing_err ? per_up : per_dn;
          at_limit  <= timing_err ? (per_up == period_ps) : (per_dn == period_ps);
        end
      end
    end
  end
endmodule
