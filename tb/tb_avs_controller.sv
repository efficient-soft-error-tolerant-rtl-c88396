// tb_avs_controller: steps the regulator with window results and checks the
// supply and period codes: one step down per clean window, one step up per
// timing-error window, saturation at the 800 mV floor and at the period
// limits, no change while disabled, and the mode switch between voltage and
// frequency regulation (the other code must stay put).
module tb_avs_controller;
  timeunit 1ps; timeprecision 1ps;
  import rad_pkg::*;

  int checks = 0, failures = 0;
  logic        clk = 1'b0, rst_n = 1'b1, enable = 1'b0;
  reg_mode_e   mode = REG_VOLTAGE;
  logic        window_done = 1'b0, timing_err = 1'b0;
  logic [11:0] vdd_mv;
  logic [19:0] period_ps;
  logic        step_up, step_down, at_limit;

  avs_controller dut (.clk, .rst_n, .enable, .mode, .window_done, .timing_err,
                      .vdd_mv, .period_ps, .step_up, .step_down, .at_limit);

  always #500 clk = ~clk;

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic window(logic terr);
    @(negedge clk);
    window_done = 1'b1; timing_err = terr;
    @(negedge clk);
    window_done = 1'b0; timing_err = 1'b0;
  endtask

  initial begin : watchdog
    #(10000 * 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, p;
    #1 rst_n = 1'b0;
    #2000 rst_n = 1'b1;
    check(vdd_mv, 1200, "reset supply");
    check(period_ps, 13333, "reset period");
    window(1'b0);
    check(vdd_mv, 1200, "disabled: no step");
    enable = 1'b1;
    v = 1200; p = 13333;
    // Random walk in voltage mode.
    for (int i = 0; i < 200; i++) begin
      logic e;
      e = (($urandom % 4) == 0);
      window(e);
      v = e ? v + 1 : v - 1;
      check(vdd_mv, v, "voltage step");
      check(period_ps, p, "period untouched in voltage mode");
    end
    // Down to the floor.
    for (int i = 0; i < 500; i++) window(1'b0);
    check(vdd_mv, 800, "supply floor");
    check(at_limit, 1, "at limit at the floor");
    window(1'b1);
    check(vdd_mv, 801, "step up from the floor");
    // Frequency mode.
    mode = REG_FREQUENCY; v = 801;
    for (int i = 0; i < 100; i++) begin
      logic e;
      e = (($urandom % 3) == 0);
      window(e);
      p = e ? p + 10 : p - 10;
      check(period_ps, p, "period step");
      check(vdd_mv, v, "supply untouched in frequency mode");
    end
    for (int i = 0; i < 1000; i++) window(1'b0);
    check(period_ps, 5000, "period floor");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
