// tb_sr_bist: runs the shift-register BIST on an 8 x 16 chain with each
// pattern, checks a clean run reports no errors and takes 2*LEN + hold + 2
// clocks, then flips chain bits during the hold phase and checks each upset
// is counted (flips that leave a bit at its pattern value are not upsets).
module tb_sr_bist;
  timeunit 1ps; timeprecision 1ps;
  import rad_pkg::*;

  localparam int R = 8, C = 16, LEN = R * C, HOLD = 20;

  int checks = 0, failures = 0;
  logic        clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  bist_pat_e   pattern = PAT_CHECKER;
  logic [15:0] hold_cycles = 16'(HOLD);
  logic        busy, done, so;
  logic [$clog2(LEN+1)-1:0] err_count;

  sr_bist #(.ROWS(R), .COLS(C)) dut (.clk, .rst_n, .start, .pattern, .hold_cycles,
                                     .busy, .done, .err_count, .so);

  always #500 clk = ~clk;

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Run once; `flips` bits are upset during the hold phase.
  task automatic run(bist_pat_e p, int flips);
    int cycles = 0, hits = 0;
    @(negedge clk);
    pattern = p; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin
      if (cycles == LEN + 5) begin   // inside the hold phase
        for (int i = 0; i < flips; i++) begin
          int r = (i * 3) % R, c = (i * 5 + 1) % C;
          dut.row[r][c] = ~dut.row[r][c];
        end
        hits = flips;
      end
      @(negedge clk);
      cycles++;
    end
    check(cycles, 2 * LEN + HOLD + 2, "run length in clocks");
    check(err_count, hits, "upsets counted");
  endtask

  initial begin : watchdog
    #(20 * LEN * 1000 + 1000000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #2000 rst_n = 1'b1;
    check(busy, 0, "idle after reset");
    run(PAT_CHECKER, 0);
    run(PAT_ALL0, 0);
    run(PAT_ALL1, 0);
    run(PAT_CHECKER, 3);
    run(PAT_ALL1, 5);
    run(PAT_ALL0, 1);
    check(done, 1, "done held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
