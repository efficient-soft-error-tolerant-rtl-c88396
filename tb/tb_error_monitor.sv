// tb_error_monitor: drives random error flags from 4 groups with a varying
// error density and checks, against a reference model kept in the testbench,
// the registered OR, the window pulse every WINDOW cycles, the per-window
// count and its classification into timing errors (3 or more) and radiation
// events (1 or 2). Each class must occur at least once.
module tb_error_monitor;
  timeunit 1ps; timeprecision 1ps;

  localparam int W = 8;

  int checks = 0, failures = 0;
  int n_timing = 0, n_rad = 0, n_quiet = 0;
  logic       clk = 1'b0, rst_n = 1'b1;
  logic [3:0] err_in = '0;
  logic       err_flag, window_done, timing_err, rad_err;
  logic [3:0] last_count;

  error_monitor #(.N_GROUPS(4), .WINDOW_CYCLES(W)) dut (
    .clk, .rst_n, .err_in, .err_flag, .window_done, .timing_err, .rad_err, .last_count);

  always #500 clk = ~clk;

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    #(5000 * 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt = 0, pos = 0, density, exp_cnt;
    logic exp_flag = 1'b0, exp_done;
    #1 rst_n = 1'b0;
    err_in = 4'hf;                 // errors during reset are not reported
    repeat (3) @(posedge clk);
    #100;
    check(int'(err_flag), 0, "flag held low in reset");
    @(posedge clk); #1 rst_n = 1'b1; err_in = '0;
    // Reference model of the sample-and-count behaviour, stepped on each edge.
    for (int w = 0; w < 60; w++) begin
      density = (w % 3 == 0) ? 0 : (w % 3 == 1) ? 6 : 60;   // percent per group-cycle
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        err_in = '0;
        for (int g = 0; g < 4; g++)
          if (($urandom % 100) < density) err_in[g] = 1'b1;
        // radiation-like windows: at most two error cycles
        if (density == 6 && cnt >= 2) err_in = '0;
        @(posedge clk);
        // model: the window closes on the edge where pos reaches W-1 and
        // counts the flag values seen at every edge of the window
        cnt += int'(exp_flag);
        exp_done = (pos == W - 1);
        exp_cnt = cnt;
        if (exp_done) begin cnt = 0; pos = 0; end
        else pos++;
        exp_flag = |err_in;
        #1;
        check(int'(err_flag), int'(exp_flag), "registered OR");
        check(int'(window_done), int'(exp_done), "window pulse");
        if (exp_done) begin
          check(int'(last_count), exp_cnt, "window count");
          check(int'(timing_err), int'(exp_cnt >= 3), "timing class");
          check(int'(rad_err), int'(exp_cnt >= 1 && exp_cnt < 3), "radiation class");
          n_timing += int'(timing_err);
          n_rad    += int'(rad_err);
          n_quiet  += int'(exp_cnt == 0);
        end
      end
    end
    check(int'(n_timing > 0 && n_rad > 0 && n_quiet > 0), 1, "all classes seen");
    $display("timing windows=%0d radiation windows=%0d quiet windows=%0d", n_timing, n_rad, n_quiet);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
