// mbff_dff: the storage cell of the multi-bit flip-flop system - a plain
// positive-edge D flip-flop with an asynchronous active-low clear.
//
// The same cell serves as primary flip-flop, as secondary storage element
// (SSE) and as the parity-storing flip-flop. RESET_VALUE chooses a clear-type
// (0) or set-type (1) cell: with even parity the parity-storing cell must come
// up as 1 and with odd parity as 0, so that a glitch on the primary reset
// raises the error flag (see mbff_system).
//
// Interface: clk rising edge samples d; clr_n low forces q to RESET_VALUE at
// once and holds it. Timing: q changes right after the rising clock edge.
//
// The state is written from a plain `always` process rather than `always_ff`
// on purpose: fault-injection testbenches deposit single-event upsets into q
// from another process, which the language forbids for an always_ff variable.
// The cell is otherwise an ordinary library-style flip-flop.
module mbff_dff #(
  parameter bit RESET_VALUE = 1'b0
) (
  input  logic clk,
  input  logic clr_n,
  input  logic d,
  output logic q
);
  timeunit 1ps; timeprecision 1ps;

  always @(posedge clk or negedge clr_n) begin
    if (!clr_n) q <= RESET_VALUE;
    else        q <= d;
  end
endmodule
