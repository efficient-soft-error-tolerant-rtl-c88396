// sr_bist: shift-register soft-error test structure with its built-in
// self-test, as used to measure the upset rate of a flip-flop type.
//
// The device under test is a chain of ROWS x COLS flip-flops, each output
// wired straight into the next flip-flop's D input with no logic between them,
// laid out as ROWS rows of COLS bits (snake order: the last bit of row r feeds
// the first bit of row r+1). One test run:
//   LOAD   - shift the selected pattern in (checkerboard, all 0 or all 1),
//            one bit per clock, ROWS*COLS clocks;
//   HOLD   - stop shifting for hold_cycles clocks: the exposure time in which
//            upsets accumulate;
//   UNLOAD - shift everything out, comparing each bit with the pattern, while
//            shifting the same pattern in again so the chain stays loaded;
//   DONE   - err_count holds the number of bits that came out wrong.
// A new start may be given in DONE or IDLE.
//
// Interface: clk, rst_n, start (one-cycle pulse), pattern (rad_pkg::bist_pat_e),
// hold_cycles in; busy, done, err_count, so (the chain's serial output) out.
// Timing: a run takes 2*ROWS*COLS + hold_cycles + 2 clocks.
//
// The chain size defaults to the 626 x 160 (100160) chain used for the robust
// flip-flop types; 126 x 160 is the size for standard cells. The chain cells
// here are ideal D flip-flops: the cell under test is a physical choice. The
// three patterns come from the design description; the run sequence, the hold
// phase and the interface are this design's own.
//
// The chain is written from a plain `always` process, not `always_ff`, so
// fault-injection testbenches can deposit upsets into it.
module sr_bist
  import rad_pkg::*;
#(
  parameter int unsigned ROWS = 626,
  parameter int unsigned COLS = 160
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                start,
  input  bist_pat_e                           pattern,
  input  logic [15:0]                         hold_cycles,
  output logic                                busy,
  output logic                                done,
  output logic [$clog2(ROWS*COLS+1)-1:0]      err_count,
  output logic                                so
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned LEN = ROWS * COLS;
  localparam int unsigned IW  = $clog2(LEN + 1);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_HOLD, S_UNLOAD, S_DONE} state_e;

  state_e          state;
  bist_pat_e       pat;
  logic [IW-1:0]   idx;
  logic [15:0]     hold;
  logic            shift;
  logic            si;
  logic [COLS-1:0] row [ROWS];

  always_comb begin
    shift = (state == S_LOAD) || (state == S_UNLOAD);
    si    = bist_pattern_bit(pat, idx[0]);
    so    = row[ROWS-1][COLS-1];
    busy  = (state != S_IDLE) && (state != S_DONE);
    done  = (state == S_DONE);
  end

  // The chain under test.
  always @(posedge clk) begin
    if (shift) begin
      row[0] <= {row[0][COLS-2:0], si};
      for (int r = 1; r < ROWS; r++)
        row[r] <= {row[r][COLS-2:0], row[r-1][COLS-1]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      pat       <= PAT_CHECKER;
      idx       <= '0;
      hold      <= '0;
      err_count <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          state     <= S_LOAD;
          pat       <= pattern;
          idx       <= '0;
          hold      <= hold_cycles;
          err_count <= '0;
        end
        S_LOAD: begin
          if (idx == IW'(LEN - 1)) begin
            idx   <= '0;
            state <= S_HOLD;
          end else idx <= idx + 1'b1;
        end
        S_HOLD: begin
          if (hold == '0) state <= S_UNLOAD;
          else            hold  <= hold - 1'b1;
        end
        S_UNLOAD: begin
          if (so != si) err_count <= err_count + 1'b1;
          if (idx == IW'(LEN - 1)) state <= S_DONE;
          else                     idx   <= idx + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
