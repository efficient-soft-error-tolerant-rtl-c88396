// tb_mbff_prog_delay: measures the delay of the programmable delay element for
// every select value (expected BASE_PS + sel*STEP_PS) and checks that the
// delay is inertial: a pulse shorter than the delay is swallowed, a longer one
// comes out with its width kept.
module tb_mbff_prog_delay;
  timeunit 1ps; timeprecision 1ps;

  localparam int BASE = 40, STEP = 25;

  int checks = 0, failures = 0;
  logic       a = 1'b0;
  logic [1:0] sel = '0;
  logic       y;
  time        t_a, t_y;

  mbff_prog_delay #(.SEL_BITS(2), .BASE_PS(BASE), .STEP_PS(STEP)) dut (.a, .sel, .y);

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
    for (int s = 0; s < 4; s++) begin
      sel = 2'(s);
      #1000;
      repeat (2) begin
        a = ~a; t_a = $time;
        @(y); t_y = $time;
        check(longint'(t_y - t_a), BASE + s * STEP, "delay for select value");
        #1000;
      end
    end
    // Pulses shorter than the 65 ps delay are swallowed.
    sel = 2'd1;
    a = 1'b0;
    #1000;
    for (int w = 10; w < 65; w += 20) begin
      a = 1'b1; #(w) a = 1'b0;
      #200;
      check(longint'(y), 0, "short pulse swallowed");
    end
    // A 100 ps pulse comes out with its width.
    fork
      begin a = 1'b1; #100 a = 1'b0; end
      begin @(posedge y); t_a = $time; @(negedge y); t_y = $time; end
    join
    check(longint'(t_y - t_a), 100, "long pulse width kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
