// mbff_system: one N-bit group of the soft-error tolerant multi-bit flip-flop
// with embedded timing pre-error sensing.
//
// Each data bit is stored twice: in a primary flip-flop clocked by CP1 and in a
// secondary storage element (SSE) clocked by CP2, a copy of CP1 delayed by one
// clock buffer (SKEW_PS). On the CP1 edge a parity flip-flop also stores Pi,
// the parity of the D inputs, which reaches it through the parity tree and the
// programmable delay PD. The error computation unit compares that stored
// parity PiR with the parity Po of the primary outputs:
//   * no fault: Po = PiR, err = 0, q shows the primary flip-flops;
//   * upset of one primary flip-flop (SEU) or a D transient captured by a
//     primary flip-flop (SET): Po flips, err = 1 and q shows the SSEs, which
//     hold the right data (they sample SKEW_PS later, after the transient);
//   * upset of an SSE: nothing visible, the primaries drive q;
//   * upset of the parity flip-flop: err = 1, q shows the SSEs, which agree
//     with the primaries, so q does not move;
//   * a D input that changes less than the PD delay before the CP1 edge: the
//     primary flip-flops take the new value but the parity flip-flop the old
//     parity, so err = 1 for that cycle - the timing pre-error flag - while q
//     stays correct because the SSEs sampled the new value too.
// The group detects and masks; it does not rewrite a corrupted flip-flop. The
// next clock edge does that.
//
// Resets: cd1_n clears the primary flip-flops and sets the parity flip-flop to
// its error-raising value (1 for even parity, 0 for odd), so a transient on
// cd1_n alone hands q to the SSEs. cd2_n clears the SSEs. With SEPARATE_RESET =
// 0 (the configuration built on silicon) the SSEs use cd1_n as well and cd2_n
// is not used. err is high while the group is held in reset; the system is
// expected to ignore it then.
//
// CLK_FILTER = 1 puts a guard-gate glitch filter in front of the primary
// flip-flops' clock (not the SSEs'); it delays CP1 by the filter's buffer.
//
// Interface: cp, cd1_n, cd2_n, pd_sel, d[N_BITS] in; q[N_BITS], err out.
// Timing: q is valid right after the CP1 edge (CP2 edge on the SSE path);
// err is combinational from the flip-flop outputs and is meant to be sampled
// on the next clock edge.
//
// Taken from the design description: the structure, parity types, reset
// polarities and the single-buffer skew. This design's own choices: the delay
// values (SKEW_PS, XOR_PS, PD steps), the PD select width and the filter delay.
module mbff_system #(
  parameter int unsigned N_BITS         = 2,
  parameter bit          EVEN_PARITY    = 1'b1,
  parameter bit          SEPARATE_RESET = 1'b0,
  parameter bit          CLK_FILTER     = 1'b0,
  parameter int unsigned SKEW_PS        = 55,
  parameter int unsigned XOR_PS         = 40,
  parameter int unsigned PD_BITS        = 2,
  parameter int unsigned PD_STEP_PS     = 25,
  parameter int unsigned FILTER_PS      = 60
) (
  input  logic               cp,
  input  logic               cd1_n,
  input  logic               cd2_n,
  input  logic [PD_BITS-1:0] pd_sel,
  input  logic [N_BITS-1:0]  d,
  output logic [N_BITS-1:0]  q,
  output logic               err
);
  timeunit 1ps; timeprecision 1ps;

  // Depth of the parity tree decides its intrinsic delay.
  localparam int unsigned TREE_LEVELS = (N_BITS > 1) ? $clog2(N_BITS) : 1;
  localparam bit          PAR_RESET   = EVEN_PARITY;

  logic              cp1, cp2;
  logic              sse_clr_n;
  logic              pi, pi_dly, pir;
  logic [N_BITS-1:0] qp, qs;

  // Primary clock, optionally through the guard-gate filter.
  if (CLK_FILTER) begin : g_filter
    clk_guard_filter #(.DELAY_PS(FILTER_PS)) u_filter (.cp(cp), .cp_filt(cp1));
  end else begin : g_nofilter
    assign cp1 = cp;
  end

  // Secondary clock: one buffer later than the raw clock.
  mbff_prog_delay #(.SEL_BITS(1), .BASE_PS(SKEW_PS), .STEP_PS(0)) u_skew (
    .a(cp), .sel(1'b0), .y(cp2)
  );

  assign sse_clr_n = SEPARATE_RESET ? cd2_n : cd1_n;

  for (genvar i = 0; i < N_BITS; i++) begin : g_bit
    mbff_dff #(.RESET_VALUE(1'b0)) u_pri (.clk(cp1), .clr_n(cd1_n),     .d(d[i]), .q(qp[i]));
    mbff_dff #(.RESET_VALUE(1'b0)) u_sse (.clk(cp2), .clr_n(sse_clr_n), .d(d[i]), .q(qs[i]));
  end

  // Input parity, delayed by the parity tree and the programmable delay.
  mbff_parity_gen #(.N_BITS(N_BITS), .EVEN_PARITY(EVEN_PARITY)) u_pgen (.d(d), .p(pi));

  mbff_prog_delay #(.SEL_BITS(PD_BITS), .BASE_PS(XOR_PS * TREE_LEVELS), .STEP_PS(PD_STEP_PS)) u_pd (
    .a(pi), .sel(pd_sel), .y(pi_dly)
  );

  mbff_dff #(.RESET_VALUE(PAR_RESET)) u_par (.clk(cp1), .clr_n(cd1_n), .d(pi_dly), .q(pir));

  mbff_ecu_mux #(.N_BITS(N_BITS), .EVEN_PARITY(EVEN_PARITY)) u_ecu (
    .qp(qp), .qs(qs), .pir(pir), .err(err), .q(q)
  );
endmodule
