// tb_mbff_dff: checks the multi-bit flip-flop storage cell - sampling on the
// rising edge, hold between edges, and the asynchronous clear to RESET_VALUE
// for both a clear-type and a set-type cell.
module tb_mbff_dff;
  timeunit 1ps; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk = 1'b0, clr_n = 1'b1, d = 1'b0;
  logic q0, q1;

  mbff_dff #(.RESET_VALUE(1'b0)) dut0 (.clk, .clr_n, .d, .q(q0));
  mbff_dff #(.RESET_VALUE(1'b1)) dut1 (.clk, .clr_n, .d, .q(q1));

  always #500 clk = ~clk;

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    #1 clr_n = 1'b0;
    #10;
    check(q0, 1'b0, "clear-type cell in reset");
    check(q1, 1'b1, "set-type cell in reset");
    @(posedge clk); #10;
    check(q0, 1'b0, "clear holds against clock");
    clr_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk) d = 1'($urandom);
      exp = d;
      @(posedge clk); #10;
      check(q0, exp, "clear-type sample");
      check(q1, exp, "set-type sample");
      #300 d = ~d;  // change between edges: must not show
      #100;
      check(q0, exp, "clear-type hold");
    end
    // Asynchronous clear in the middle of a cycle.
    @(negedge clk) d = 1'b1;
    @(posedge clk); #100;
    clr_n = 1'b0; #5;
    check(q0, 1'b0, "async clear");
    check(q1, 1'b1, "async set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
