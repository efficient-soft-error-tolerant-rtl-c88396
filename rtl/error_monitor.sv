// error_monitor: system-level collector of the multi-bit flip-flop error flags
// ("sample and count" circuit).
//
// The ERROR outputs of all flip-flop groups are ORed and registered once per
// clock; that registered flag (err_flag) is what leaves the chip. A counter
// then counts the cycles in which err_flag was high over a window of
// WINDOW_CYCLES clocks. At the end of each window the count is classified:
//   * count >= TIMING_THRESHOLD (three, i.e. "more than two"): timing_err -
//     errors this frequent are systematic, i.e. timing pre-errors;
//   * 1 <= count < TIMING_THRESHOLD: rad_err - a sporadic event such as a
//     particle strike.
// Both are one-cycle pulses given together with window_done, and last_count
// holds the count of the window just closed.
//
// Interface: clk, rst_n (active-low, synchronous to clk for the outputs),
// err_in[N_GROUPS]. Timing: an error present before a rising edge is in
// err_flag after that edge and counted in the window that edge belongs to.
//
// The OR, the register and the threshold of two come from the design
// description; the window length and counter widths are this design's choice.
// err_flag is held low while rst_n is low, which also hides the error the
// flip-flop groups raise by construction while they are in reset.
module error_monitor #(
  parameter int unsigned N_GROUPS         = 16,
  parameter int unsigned WINDOW_CYCLES    = 64,
  parameter int unsigned TIMING_THRESHOLD = 3
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [N_GROUPS-1:0]              err_in,
  output logic                             err_flag,
  output logic                             window_done,
  output logic                             timing_err,
  output logic                             rad_err,
  output logic [$clog2(WINDOW_CYCLES+1)-1:0] last_count
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned CW = $clog2(WINDOW_CYCLES + 1);
  localparam int unsigned PW = (WINDOW_CYCLES > 1) ? $clog2(WINDOW_CYCLES) : 1;

  logic [PW-1:0] pos;     // position inside the window
  logic [CW-1:0] count;   // error cycles so far in this window
  logic [CW-1:0] total;   // count including the current cycle

  always_comb total = count + CW'(err_flag);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_flag    <= 1'b0;
      pos         <= '0;
      count       <= '0;
      window_done <= 1'b0;
      timing_err  <= 1'b0;
      rad_err     <= 1'b0;
      last_count  <= '0;
    end else begin
      err_flag    <= |err_in;
      window_done <= 1'b0;
      timing_err  <= 1'b0;
      rad_err     <= 1'b0;
      if (pos == PW'(WINDOW_CYCLES - 1)) begin
        pos         <= '0;
        count       <= '0;
        window_done <= 1'b1;
        last_count  <= total;
        timing_err  <= (total >= CW'(TIMING_THRESHOLD));
        rad_err     <= (total != '0) && (total < CW'(TIMING_THRESHOLD));
      end else begin
        pos   <= pos + 1'b1;
        count <= total;
      end
    end
  end
endmodule
