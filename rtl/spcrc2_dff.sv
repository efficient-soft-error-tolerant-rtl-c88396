// spcrc2_dff: behavioural model of the single-phase clocked, C-element based
// radiation-tolerant D flip-flop. This is a simulation model of a
// transistor-level cell (it needs the cell's own layout and devices); it is
// not meant for synthesis.
//
// How the cell works, and what the model reproduces node by node:
//   * Input stage: inverters turn D into three rails, D itself, DN (one
//     inverter) and DB (two inverters, so a delayed copy of D). The master
//     only accepts data while D = DB = ~DN, so a transient on D shorter than
//     the two-inverter delay (2*INV_PS) never resolves into the latch.
//   * Master latch, transparent while CP is low: storage nodes MA, MB (true)
//     and MAn, MBn (complement) follow the input rails once they agree. While
//     CP is high it holds, and each node is then kept by two others: MA and MB
//     by MAn and MBn, MAn and MBn by MA and MB. A node is only driven when its
//     two keepers agree, so a strike that flips one node leaves the others
//     where they were and the node recovers when the strike ends.
//   * Slave latch, transparent while CP is high: SA, SB, SAn, SBn take the
//     master's value only when all four master nodes are consistent, and hold
//     with the same two-of-two dependency while CP is low.
//   * Output stage: a C-element of SA and SB drives Q; it changes only when
//     both agree, so a strike on one slave node never reaches Q.
// One clock phase, no internal clock inverters: the cell samples D on the
// rising edge of CP.
//
// Interface: CP, D in; Q out, as the library cell. Timing: Q follows D as
// sampled at the rising edge of CP; D must be steady 2*INV_PS before the edge
// (the cell's larger setup time).
//
// Fault injection: `strike` is a model-only variable, bit k standing for a
// particle strike on storage node k (0 MA, 1 MB, 2 MAn, 3 MBn, 4 SA, 5 SB,
// 6 SAn, 7 SBn). Setting a bit flips that node and holds it there; clearing it
// lets the node be driven again. A testbench sets it hierarchically.
//
// From the design description: the stages, node names, their dependencies and
// latch phases. This model's own choices: the inverter delay and the
// two-valued abstraction of the transistor behaviour (a node that "does not
// resolve" simply keeps its value).
module spcrc2_dff #(
  parameter int unsigned INV_PS = 30
) (
  input  logic CP,
  input  logic D,
  output logic Q
);
  timeunit 1ps; timeprecision 1ps;

  localparam int MA = 0, MB = 1, MAN = 2, MBN = 3;
  localparam int SA = 4, SB = 5, SAN = 6, SBN = 7;

  logic       dn, db;
  logic [7:0] node;
  logic [7:0] strike      = '0;
  logic [7:0] strike_prev;

  // Input stage: one inverter to DN, two to DB.
  assign #(INV_PS)     dn = ~D;
  assign #(2 * INV_PS) db = D;

  // Node evaluation: repeated until the nodes have settled (four passes are
  // more than the two the longest chain needs).
  always @(CP or D or dn or db or strike) begin : eval
    logic [7:0] n, nx;
    n = node;
    for (int k = 0; k < 8; k++)
      if (strike[k] && !strike_prev[k]) n[k] = ~n[k];
    strike_prev = strike;
    for (int pass = 0; pass < 4; pass++) begin
      nx = n;
      // Master latch.
      if (!CP) begin
        if (D == db && dn == ~D) begin
          nx[MA] = D;   nx[MB] = D;
          nx[MAN] = ~D; nx[MBN] = ~D;
        end
      end else begin
        if (n[MAN] == n[MBN]) begin nx[MA]  = ~n[MAN]; nx[MB]  = ~n[MAN]; end
        if (n[MA]  == n[MB])  begin nx[MAN] = ~n[MA];  nx[MBN] = ~n[MA];  end
      end
      // Slave latch.
      if (CP) begin
        if (n[MA] == n[MB] && n[MAN] == n[MBN] && n[MA] != n[MAN]) begin
          nx[SA]  = n[MA];  nx[SB]  = n[MA];
          nx[SAN] = n[MAN]; nx[SBN] = n[MAN];
        end
      end else begin
        if (n[SAN] == n[SBN]) begin nx[SA]  = ~n[SAN]; nx[SB]  = ~n[SAN]; end
        if (n[SA]  == n[SB])  begin nx[SAN] = ~n[SA];  nx[SBN] = ~n[SA];  end
      end
      // A struck node stays where the strike put it.
      for (int k = 0; k < 8; k++)
        if (strike[k]) nx[k] = n[k];
      n = nx;
    end
    node = n;
    // Output C-element.
    if (n[SA] == n[SB]) Q = n[SA];
  end
endmodule
