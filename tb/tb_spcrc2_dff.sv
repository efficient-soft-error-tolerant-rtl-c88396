// tb_spcrc2_dff: checks the SPCRC2 flip-flop model - edge sampling, a strike
// on every single storage node in both clock phases (no effect on Q, node
// recovers), filtering of short D transients and capture of long ones, and a
// two-node strike, which the cell is not built to survive.
module tb_spcrc2_dff;
  timeunit 1ps; timeprecision 1ps;

  localparam int T = 2000;

  int checks = 0, failures = 0;
  logic cp = 1'b0, d = 1'b0, q;

  spcrc2_dff dut (.CP(cp), .D(d), .Q(q));

  always #(T/2) cp = ~cp;

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    #(3000 * T);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic v;
    // Normal sampling: D changes in the middle of the low phase.
    for (int i = 0; i < 40; i++) begin
      @(negedge cp); #(T/4);
      v = 1'($urandom); d = v;
      @(posedge cp); #(T/4);
      check(q, v, "sampled on rising edge");
      #(T/2);                   // into the low phase, master transparent
      check(q, v, "held through low phase");
    end
    // Strike on each node, in the high phase (master latched, slave open)
    // and in the low phase (master open, slave latched).
    for (int k = 0; k < 8; k++) begin
      for (int ph = 0; ph < 2; ph++) begin
        @(negedge cp); #(T/4);
        v = 1'($urandom); d = v;
        @(posedge cp); #(T/8);
        if (ph == 1) begin @(negedge cp); #(T/8); end
        dut.strike[k] = 1'b1;
        #(T/8);
        check(q, v, "Q kept during strike");
        dut.strike[k] = 1'b0;
        #(T/16);
        check(q, v, "Q kept after strike");
        check(dut.node[k], (k % 4 < 2) ? v : !v, "struck node recovered");
        @(posedge cp); #(T/8);
        check(q, d, "next sample after strike");
      end
    end
    // D transients just before the rising edge.
    d = 1'b0;
    @(posedge cp); #(T/4); check(q, 0, "set up 0");
    for (int w = 10; w <= 50; w += 20) begin
      @(negedge cp); #(T/2 - w - 10);
      d = 1'b1; #(w) d = 1'b0;
      @(posedge cp); #(T/4);
      check(q, 0, "short transient filtered");
    end
    @(negedge cp); #(T/2 - 120);
    d = 1'b1; #100 d = 1'b0;
    @(posedge cp); #(T/4);
    check(q, 1, "long pulse captured");
    @(posedge cp); #(T/4);
    check(q, 0, "back to 0");
    // Two true nodes of the master struck together while it holds: the
    // complement nodes follow, and the wrong value goes through.
    @(negedge cp); #(T/4); d = 1'b1;
    @(posedge cp); #(T/8);
    @(negedge cp);                   // master open, so strike after re-latching
    @(posedge cp); #(T/8);
    dut.strike[0] = 1'b1; dut.strike[1] = 1'b1;
    #(T/8);
    dut.strike[0] = 1'b0; dut.strike[1] = 1'b0;
    #(T/8);
    check(q, 0, "double-node strike corrupts the cell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
