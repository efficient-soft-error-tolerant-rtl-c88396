// mbff_ecu_mux: error computation unit and output selection of one multi-bit
// flip-flop group.
//
// The ECU recomputes the parity Po of what the primary flip-flops now hold and
// XORs it with PiR, the parity of the D inputs that the parity flip-flop stored
// on the same clock edge. Any difference raises err. The output mux then
// passes the primary flip-flops to q while err is low and the secondary
// storage elements (SSE) while err is high.
//
// Interface: qp = primary FF outputs, qs = SSE outputs, pir = stored parity;
// err and q out. Purely combinational: err follows any change of qp or pir
// within the same cycle, which is what lets an upset in a primary flip-flop be
// masked before the next clock edge.
module mbff_ecu_mux #(
  parameter int unsigned N_BITS      = 2,
  parameter bit          EVEN_PARITY = 1'b1
) (
  input  logic [N_BITS-1:0] qp,
  input  logic [N_BITS-1:0] qs,
  input  logic              pir,
  output logic              err,
  output logic [N_BITS-1:0] q
);
  timeunit 1ps; timeprecision 1ps;

  logic po;

  mbff_parity_gen #(.N_BITS(N_BITS), .EVEN_PARITY(EVEN_PARITY)) u_po (
    .d(qp), .p(po)
  );

  always_comb begin
    err = po ^ pir;
    q   = err ? qs : qp;
  end
endmodule
