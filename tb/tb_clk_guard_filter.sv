// tb_clk_guard_filter: checks that the guard-gate filter passes real clock
// edges one buffer delay late and blocks clock glitches shorter than that
// delay, while a pulse longer than the delay gets through.
module tb_clk_guard_filter;
  timeunit 1ps; timeprecision 1ps;

  localparam int DLY = 60;

  int checks = 0, failures = 0;
  logic cp = 1'b0;
  logic cp_filt;
  int   edges = 0;
  time  t_in;

  clk_guard_filter #(.DELAY_PS(DLY)) dut (.cp, .cp_filt);

  always @(cp_filt) edges++;

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    check(cp_filt, 0, "settled low");
    for (int i = 0; i < 5; i++) begin
      edges = 0;
      cp = 1'b1; t_in = $time;
      @(posedge cp_filt);
      check(longint'($time - t_in), DLY, "rising edge delay");
      #500 cp = 1'b0; t_in = $time;
      @(negedge cp_filt);
      check(longint'($time - t_in), DLY, "falling edge delay");
      #500;
      check(edges, 2, "edges per clock");
    end
    // Glitches shorter than the buffer delay are blocked.
    for (int w = 10; w < DLY; w += 15) begin
      edges = 0;
      cp = 1'b1; #(w) cp = 1'b0;
      #500;
      check(edges, 0, "short high glitch blocked");
      check(cp_filt, 0, "output still low");
    end
    cp = 1'b1; #1000;
    edges = 0;
    cp = 1'b0; #30 cp = 1'b1;
    #500;
    check(edges, 0, "short low glitch blocked");
    // A pulse longer than the delay passes.
    cp = 1'b0; #1000;
    edges = 0;
    cp = 1'b1; #(DLY + 40) cp = 1'b0;
    #500;
    check(edges, 2, "long pulse passes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
