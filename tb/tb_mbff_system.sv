// tb_mbff_system: scenario test of one multi-bit flip-flop group.
//
// Instances: the 2-bit even-parity group as built on silicon (common reset),
// a 2-bit odd-parity group with separate resets, 4-bit and 8-bit even groups,
// and a 2-bit group with the clock glitch filter. Clock period 1000 ps; D normally
// changes in the middle of the cycle. Checked 300 ps after the clock edge:
//   normal operation (q = sampled data, err low), upsets of a primary, a
//   secondary and the parity flip-flop, a transient on D captured only by a
//   primary flip-flop, timing pre-errors inside and outside the detection
//   window for two delay settings, reset behaviour, a transient on the
//   primary reset, a clock glitch blocked by the filter, and the widening of
//   the pre-error window with the parity tree depth (40/80/120 ps for 2, 4
//   and 8 bits at the shortest delay setting).
// Upsets are deposited straight into the storage cells.
module tb_mbff_system;
  timeunit 1ps; timeprecision 1ps;

  localparam int T = 1000;

  int checks = 0, failures = 0;
  int n_seu = 0, n_tpe = 0, n_set = 0;

  logic       cp = 1'b0, cp_f = 1'b0;
  logic       cd1_n = 1'b1, cd2_n = 1'b1;
  logic [1:0] pd_sel = '0;
  logic [1:0] d2 = '0, q_e, q_o, q_f;
  logic [3:0] d4 = '0, q4;
  logic [7:0] d8 = '0, q8;
  logic       err_e, err_o, err4, err8, err_f;

  mbff_system #(.N_BITS(2), .EVEN_PARITY(1'b1)) dut_e (
    .cp, .cd1_n, .cd2_n(1'b1), .pd_sel, .d(d2), .q(q_e), .err(err_e));
  mbff_system #(.N_BITS(2), .EVEN_PARITY(1'b0), .SEPARATE_RESET(1'b1)) dut_o (
    .cp, .cd1_n, .cd2_n, .pd_sel, .d(d2), .q(q_o), .err(err_o));
  mbff_system #(.N_BITS(4), .EVEN_PARITY(1'b1)) dut_4 (
    .cp, .cd1_n, .cd2_n(1'b1), .pd_sel, .d(d4), .q(q4), .err(err4));
  mbff_system #(.N_BITS(8), .EVEN_PARITY(1'b1)) dut_8 (
    .cp, .cd1_n, .cd2_n(1'b1), .pd_sel, .d(d8), .q(q8), .err(err8));
  mbff_system #(.N_BITS(2), .EVEN_PARITY(1'b1), .CLK_FILTER(1'b1)) dut_f (
    .cp(cp_f), .cd1_n, .cd2_n(1'b1), .pd_sel, .d(d2), .q(q_f), .err(err_f));

  always #(T/2) cp = ~cp;

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  // Wait for the next rising edge plus `after` ps.
  task automatic edge_plus(int after);
    @(posedge cp);
    #(after);
  endtask

  initial begin : watchdog
    #(2000 * T);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The filtered instance gets its own clock with an optional glitch.
  logic glitch_f = 1'b0;
  always @(cp or glitch_f) cp_f = cp ^ glitch_f;

  initial begin
    logic [1:0] prev;
    // Reset: outputs cleared, error raised by construction.
    #1 cd1_n = 1'b0; cd2_n = 1'b0;
    #(T/4);
    check(q_e, 0, "q in reset");
    check(err_e, 1, "even group err in reset");
    check(err_o, 1, "odd group err in reset");
    edge_plus(T/2);
    cd1_n = 1'b1; cd2_n = 1'b1;
    #10;
    check(err_e, 1, "err until first edge after reset");

    // Normal operation.
    for (int i = 0; i < 30; i++) begin
      d2 = 2'($urandom); d4 = 4'($urandom); d8 = 8'($urandom);
      edge_plus(300);
      check(q_e, d2, "even q"); check(err_e, 0, "even err");
      check(q_o, d2, "odd q");  check(err_o, 0, "odd err");
      check(q4, d4, "4-bit q"); check(err4, 0, "4-bit err");
      check(q8, d8, "8-bit q"); check(err8, 0, "8-bit err");
      check(q_f, d2, "filtered q"); check(err_f, 0, "filtered err");
      #(T/2 - 300);
    end

    // SEU in each primary flip-flop: flagged, masked.
    for (int b = 0; b < 2; b++) begin
      d2 = 2'b10; d8 = 8'h5a;
      edge_plus(300);
      if (b == 0) dut_e.g_bit[0].u_pri.q = ~dut_e.g_bit[0].u_pri.q;
      else        dut_e.g_bit[1].u_pri.q = ~dut_e.g_bit[1].u_pri.q;
      dut_8.g_bit[5].u_pri.q = ~dut_8.g_bit[5].u_pri.q;
      #10;
      check(err_e, 1, "primary SEU flagged");
      check(q_e, 2'b10, "primary SEU masked");
      check(err8, 1, "8-bit primary SEU flagged");
      check(q8, 8'h5a, "8-bit primary SEU masked");
      n_seu += int'(err_e && q_e == 2'b10);
      edge_plus(300);
      check(err_e, 0, "next edge rewrites the primary");
    end

    // SEU in a secondary element: invisible.
    d2 = 2'b01;
    edge_plus(300);
    dut_e.g_bit[0].u_sse.q = ~dut_e.g_bit[0].u_sse.q;
    #10;
    check(err_e, 0, "SSE SEU not flagged");
    check(q_e, 2'b01, "SSE SEU not visible");

    // SEU in the parity flip-flop: flagged, outputs unchanged.
    edge_plus(300);
    dut_e.u_par.q = ~dut_e.u_par.q;
    #10;
    check(err_e, 1, "parity SEU flagged");
    check(q_e, 2'b01, "parity SEU outputs unchanged");
    n_seu += int'(err_e);

    // SET on D1 captured only by the primary flip-flop: a 30 ps pulse
    // straddling the edge. The parity path sees it 40 ps late and the SSE
    // 55 ps late, both after it has ended.
    d2 = 2'b00;
    edge_plus(0);
    #(T - 20) d2[0] = 1'b1;
    @(posedge cp);
    #10 d2[0] = 1'b0;
    #290;
    check(err_e, 1, "D transient captured by primary flagged");
    check(q_e, 2'b00, "D transient masked by SSE");
    n_set += int'(err_e && q_e == 2'b00);

    // Timing pre-errors: D changes (parity change) shortly before the edge.
    for (int s = 0; s < 2; s++) begin
      pd_sel = (s == 0) ? 2'd0 : 2'd3;      // window 40 ps or 115 ps
      edge_plus(300);
      d2 = 2'b00;
      edge_plus(0);
      #(T - 30) d2 = 2'b01;                 // 30 ps before the edge
      edge_plus(300);
      check(err_e, 1, "late change inside window flagged");
      check(q_e, 2'b01, "late change: outputs correct");
      n_tpe += int'(err_e);
      #(T - 300 - 100) d2 = 2'b00;          // 100 ps before the edge
      edge_plus(300);
      check(err_e, (s == 1), "100 ps early change: flagged only with long window");
      check(q_e, 2'b00, "100 ps early change: outputs correct");
      n_tpe += int'(err_e);
      #(T - 300 - 300) d2 = 2'b11;          // 300 ps before: always clean
      edge_plus(300);
      check(err_e, 0, "early change not flagged");
      check(q_e, 2'b11, "early change outputs");
    end
    pd_sel = 2'd0;

    // Window width against group width: one D bit changes `lead` ps before
    // the edge. Tree depth 1, 2, 3 levels of 40 ps.
    for (int k = 0; k < 2; k++) begin
      int lead;
      lead = (k == 0) ? 60 : 100;
      d2 = '0; d4 = '0; d8 = '0;
      edge_plus(300);
      #(T - 300 - lead);
      d2 = 2'b01; d4 = 4'b0001; d8 = 8'h01;
      edge_plus(300);
      check(err_e, 0, "2-bit window (40 ps) misses the change");
      check(err4, 8'(lead < 80), "4-bit window (80 ps)");
      check(err8, 8'(lead < 120), "8-bit window (120 ps)");
      check(q4, 4'b0001, "4-bit outputs correct"); check(q8, 8'h01, "8-bit outputs correct");
      n_tpe += int'(err8);
    end

    // Transient on the primary reset of the separate-reset group.
    d2 = 2'b10;
    edge_plus(300);
    cd1_n = 1'b0; #30 cd1_n = 1'b1;
    #10;
    check(err_o, 1, "reset transient flagged");
    check(q_o, 2'b10, "reset transient masked by SSE");
    // and on its secondary reset: no effect
    edge_plus(300);
    cd2_n = 1'b0; #30 cd2_n = 1'b1;
    #10;
    check(err_o, 0, "secondary reset transient not flagged");
    check(q_o, 2'b10, "secondary reset transient invisible");

    // Clock glitch on the filtered group: the primaries ignore it.
    d2 = 2'b01;
    edge_plus(300);
    prev = q_f;
    d2 = 2'b10;
    #100 glitch_f = 1'b1; #30 glitch_f = 1'b0;
    #100;
    check(q_f, prev, "clock glitch filtered: q unchanged");
    check(err_f, 0, "clock glitch filtered: no error");
    edge_plus(300);
    check(q_f, 2'b10, "filtered group samples at the real edge");

    check(8'(n_seu > 0 && n_set > 0 && n_tpe >= 3), 8'd1, "every mechanism seen");
    $display("seu=%0d set=%0d timing_pre_errors=%0d", n_seu, n_set, n_tpe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
