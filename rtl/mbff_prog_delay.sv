// mbff_prog_delay: behavioural model of a delay element with select lines.
// This is a simulation model of a physical delay chain, not synthesizable
// logic: a synthesis tool reduces it to a wire.
//
// In the multi-bit flip-flop system it has two uses:
//   * PD, the programmable delay on the input-parity path. Its total delay is
//     the intrinsic delay of the parity tree (BASE_PS) plus sel * STEP_PS, and
//     that delay is the width of the timing pre-error detection window: a D
//     input that changes less than this before the clock edge reaches the
//     primary flip-flops but not the parity flip-flop.
//   * the single clock buffer that skews the secondary clock CP2 against CP1
//     (sel tied to 0, STEP_PS unused).
//
// Interface: a in, y out, sel selects the extra delay. Timing: y repeats every
// change of a after BASE_PS + sel*STEP_PS. The delay is inertial, as for a
// chain of gates: a pulse shorter than the delay does not come out. The delay values are assumptions
// of this design; the select width is too.
// The delay depends on sel, so a linter cannot prove it non-zero and says
// so; with BASE_PS > 0 it never is.
module mbff_prog_delay #(
  parameter int unsigned SEL_BITS = 2,
  parameter int unsigned BASE_PS  = 40,
  parameter int unsigned STEP_PS  = 25
) (
  input  logic                a,
  input  logic [SEL_BITS-1:0] sel,
  output logic                y
);
  timeunit 1ps; timeprecision 1ps;

  assign #(BASE_PS + int'(sel) * STEP_PS) y = a;
endmodule
