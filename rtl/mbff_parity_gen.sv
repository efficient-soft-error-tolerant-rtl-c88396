// mbff_parity_gen: N-bit parity generator (PGEN) of the multi-bit flip-flop
// system.
//
// Even parity is the XOR of all inputs, odd parity its complement (an XNOR
// tree). The system uses one instance on the D inputs (input parity Pi) and one
// on the primary flip-flop outputs (output parity Po); they must be the same
// kind so the two agree whenever the primary flip-flops hold what was sampled.
//
// Interface: d[N_BITS-1:0] in, p out. Purely combinational; the gate delay of
// the input-side tree is modelled separately by mbff_prog_delay.
module mbff_parity_gen #(
  parameter int unsigned N_BITS      = 2,
  parameter bit          EVEN_PARITY = 1'b1
) (
  input  logic [N_BITS-1:0] d,
  output logic              p
);
  timeunit 1ps; timeprecision 1ps;

  always_comb p = EVEN_PARITY ? ^d : ~^d;
endmodule
