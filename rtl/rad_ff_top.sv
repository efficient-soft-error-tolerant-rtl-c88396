// rad_ff_top: soft-error tolerant register system with timing pre-error driven
// voltage/frequency regulation, shown beside the other hardware of the
// radiation test vehicle.
//
// Main path - the multi-bit flip-flop register bank:
//   REG_BITS data bits are stored in REG_BITS/N_BITS groups (mbff_system).
//   Each group masks single-event upsets and transients on its own and raises
//   its error flag on an upset or when data arrives within the pre-error
//   window before the clock edge. The group flags are ORed and registered by
//   error_monitor, which also sorts them per window into timing errors
//   (frequent) and radiation events (sporadic). Timing errors drive
//   avs_controller, which steps the supply code (or the clock-period code) up;
//   error-free windows step it down. The codes go off-chip to the regulator
//   and clock source, closing the loop.
// Side by side with it:
//   * an SP_BITS-wide register of single-phase clocked C-element flip-flops
//     (spcrc2_dff), the second, cell-level hardening solution;
//   * the system RAM with its SECDED wrapper (ecc_ram);
//   * the shift-register upset test structure with BIST (sr_bist).
// The processor core, ROM and GPIOs that surround these on the test chip are
// third-party or unspecified parts and are not included; their connections to
// the register bank and RAM are the top's ports.
//
// Clock and reset: one clock clk for everything (it is CP of the flip-flop
// groups; their secondary clock is derived inside each group) and one
// active-low reset rst_n. The groups' primary and secondary resets both come
// from rst_n, through separate buffer trees in a real layout.
//
// Timing: mb_q shows mb_d one clock after it is sampled; err_flag one clock
// after an error; regulation codes change once per monitor window.
// Register widths and the window length are this design's choices.
module rad_ff_top
  import rad_pkg::*;
  import secded_pkg::*;
#(
  parameter int unsigned REG_BITS      = 32,
  parameter int unsigned N_BITS        = 2,
  parameter bit          EVEN_PARITY   = 1'b1,
  parameter int unsigned PD_BITS       = 2,
  parameter int unsigned WINDOW_CYCLES = 64,
  parameter int unsigned SP_BITS       = 32,
  parameter int unsigned RAM_ADDR_W    = 13,
  parameter int unsigned SR_ROWS       = 626,
  parameter int unsigned SR_COLS       = 160
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // multi-bit flip-flop register bank
  input  logic [REG_BITS-1:0]     mb_d,
  output logic [REG_BITS-1:0]     mb_q,
  input  logic [PD_BITS-1:0]      pd_sel,
  output logic                    err_flag,
  output logic                    window_done,
  output logic                    timing_err,
  output logic                    rad_err,
  output logic [$clog2(WINDOW_CYCLES+1)-1:0] err_count,
  // closed-loop regulation
  input  logic                    reg_enable,
  input  reg_mode_e               reg_mode,
  output logic [11:0]             vdd_mv,
  output logic [19:0]             period_ps,
  output logic                    reg_step_up,
  output logic                    reg_step_down,
  output logic                    reg_at_limit,
  // SPCRC2 flip-flop register
  input  logic [SP_BITS-1:0]      sp_d,
  output logic [SP_BITS-1:0]      sp_q,
  // system RAM
  input  logic                    ram_req,
  input  logic                    ram_we,
  input  logic [RAM_ADDR_W-1:0]   ram_addr,
  input  data_t                   ram_wdata,
  input  logic                    ram_ecc_bypass,
  output logic                    ram_ready,
  output logic                    ram_rvalid,
  output data_t                   ram_rdata,
  output logic                    ram_sec,
  output logic                    ram_ded,
  // shift-register BIST
  input  logic                    bist_start,
  input  bist_pat_e               bist_pattern,
  input  logic [15:0]             bist_hold,
  output logic                    bist_busy,
  output logic                    bist_done,
  output logic [$clog2(SR_ROWS*SR_COLS+1)-1:0] bist_err_count,
  output logic                    bist_so
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N_GROUPS = REG_BITS / N_BITS;

  logic [N_GROUPS-1:0] grp_err;

  for (genvar g = 0; g < N_GROUPS; g++) begin : g_grp
    mbff_system #(
      .N_BITS(N_BITS), .EVEN_PARITY(EVEN_PARITY), .PD_BITS(PD_BITS)
    ) u_grp (
      .cp    (clk),
      .cd1_n (rst_n),
      .cd2_n (rst_n),
      .pd_sel(pd_sel),
      .d     (mb_d[g*N_BITS +: N_BITS]),
      .q     (mb_q[g*N_BITS +: N_BITS]),
      .err   (grp_err[g])
    );
  end

  error_monitor #(.N_GROUPS(N_GROUPS), .WINDOW_CYCLES(WINDOW_CYCLES)) u_mon (
    .clk, .rst_n, .err_in(grp_err), .err_flag, .window_done, .timing_err, .rad_err,
    .last_count(err_count)
  );

  avs_controller u_avs (
    .clk, .rst_n, .enable(reg_enable), .mode(reg_mode), .window_done, .timing_err,
    .vdd_mv, .period_ps, .step_up(reg_step_up), .step_down(reg_step_down),
    .at_limit(reg_at_limit)
  );

  for (genvar i = 0; i < SP_BITS; i++) begin : g_sp
    spcrc2_dff u_ff (.CP(clk), .D(sp_d[i]), .Q(sp_q[i]));
  end

  ecc_ram #(.ADDR_W(RAM_ADDR_W)) u_ram (
    .clk, .rst_n, .req(ram_req), .we(ram_we), .addr(ram_addr), .wdata(ram_wdata),
    .ecc_bypass(ram_ecc_bypass), .ready(ram_ready), .rvalid(ram_rvalid),
    .rdata(ram_rdata), .sec(ram_sec), .ded(ram_ded)
  );

  sr_bist #(.ROWS(SR_ROWS), .COLS(SR_COLS)) u_sr (
    .clk, .rst_n, .start(bist_start), .pattern(bist_pattern), .hold_cycles(bist_hold),
    .busy(bist_busy), .done(bist_done), .err_count(bist_err_count), .so(bist_so)
  );
endmodule
