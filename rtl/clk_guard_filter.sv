// clk_guard_filter: behavioural model of the guard-gate glitch filter that can
// sit in front of the primary flip-flops' clock pin. A simulation model of a
// transistor-level cell, not synthesizable logic.
//
// The clock CP and a copy of it delayed by one buffer (DELAY_PS) drive the two
// stacks of a C-element: the output changes only when both inputs agree and
// holds its value while they differ. A genuine clock edge therefore appears at
// the output DELAY_PS late, while a single-event transient shorter than
// DELAY_PS is never seen on both inputs at once and does not get through.
//
// The C-element in the filter's schematic is an inverting transistor stack;
// this model gives the output in the clock's own polarity (as if followed by an
// inverter) so it can replace the clock wire directly - a choice of this model.
// The buffer delay is an assumption.
//
// Interface: cp in, cp_filt out.
module clk_guard_filter #(
  parameter int unsigned DELAY_PS = 60
) (
  input  logic cp,
  output logic cp_filt
);
  timeunit 1ps; timeprecision 1ps;

  logic cp_dly;

  // The buffer (inertial delay, like the real cell).
  assign #(DELAY_PS) cp_dly = cp;

  // The C-element: follow the inputs when they agree, hold otherwise.
  // A C-element is a latch by nature, hence always_latch.
  always_latch begin
    if (cp == cp_dly) cp_filt = cp;
  end
endmodule
