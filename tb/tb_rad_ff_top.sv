// tb_rad_ff_top: end-to-end test of the whole design at its default size.
//
// The register bank is driven by a model of the logic in front of it: every
// clock edge launches a new random word, which arrives after a path delay that
// grows as the supply code falls (1500 ps at 1200 mV, K / (vdd - 400 mV)).
// The testbench clock period follows the regulator's period code (x 0.15, so
// 13333 -> 2000 ps). With the regulator enabled the loop first lowers the
// supply until data starts to land inside the pre-error window, then dithers
// there; after a switch to frequency mode it lengthens and shortens the
// period instead. Every word that reaches the register outputs is checked, so
// the test also shows that the pre-error flag comes before real failures.
// Alongside: single-event upsets deposited in the register bank (masked and
// classed as radiation events), strikes on SPCRC2 register nodes, single and
// double errors and the bypass of the ECC RAM, and one full-size BIST run
// with two upsets.
// Each mechanism is counted and must occur at least once.
module tb_rad_ff_top;
  timeunit 1ps; timeprecision 1ps;
  import rad_pkg::*;
  import secded_pkg::*;

  int checks = 0, failures = 0;
  int n_timing = 0, n_vup = 0, n_vdn = 0, n_fup = 0, n_fdn = 0, n_rad = 0;
  int n_seu_masked = 0, n_sp_strike = 0, n_sec = 0, n_wb = 0, n_ded = 0, n_bypass = 0;
  int n_bist_upsets = 0, n_words = 0;

  logic        clk = 1'b0, rst_n = 1'b1;
  logic [31:0] mb_d = '0, mb_q;
  logic [1:0]  pd_sel = '0;
  logic        err_flag, window_done, timing_err, rad_err;
  logic [6:0]  err_count;
  logic        reg_enable = 1'b0;
  reg_mode_e   reg_mode = REG_VOLTAGE;
  logic [11:0] vdd_mv;
  logic [19:0] period_ps;
  logic        reg_step_up, reg_step_down, reg_at_limit;
  logic [31:0] sp_d = '0, sp_q;
  logic        ram_req = 1'b0, ram_we = 1'b0, ram_ecc_bypass = 1'b0;
  logic [12:0] ram_addr = '0;
  data_t       ram_wdata = '0, ram_rdata;
  logic        ram_ready, ram_rvalid, ram_sec, ram_ded;
  logic        bist_start = 1'b0;
  bist_pat_e   bist_pattern = PAT_CHECKER;
  logic [15:0] bist_hold = 16'd100;
  logic        bist_busy, bist_done, bist_so;
  logic [16:0] bist_err_count;

  rad_ff_top dut (.*);

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // Clock source: period follows the regulator code.
  int tclk;
  always begin
    tclk = int'(period_ps) * 3 / 20;
    if (tclk < 1000 || tclk > 200000) tclk = 2000;   // code not yet reset
    #(tclk / 2) clk = 1'b1;
    #(tclk - tclk / 2) clk = 1'b0;
  end

  // Path delay model of the logic in front of the register bank.
  function automatic int path_delay();
    return 1200000 / (int'(vdd_mv) - 400);
  endfunction

  // Launch a new word each edge; check the previous one at the outputs.
  logic [31:0] exp_q;
  logic        run_data = 1'b0;
  always @(posedge clk) begin
    if (run_data) begin
      automatic logic [31:0] nv = $urandom;
      automatic int          dly = path_delay();
      exp_q = mb_d;                      // what the flip-flops sample now
      fork
        begin #(dly) mb_d = nv; end
        begin #300 check(mb_q, exp_q, "register bank output"); n_words++; end
      join_none
    end
  end

  // Count the monitor and regulator events.
  always @(posedge clk) begin
    if (rst_n) begin
      n_timing += int'(timing_err);
      n_rad    += int'(rad_err);
      if (reg_step_up)   begin if (reg_mode == REG_VOLTAGE) n_vup++; else n_fup++; end
      if (reg_step_down) begin if (reg_mode == REG_VOLTAGE) n_vdn++; else n_fdn++; end
    end
  end

  initial begin : watchdog
    #(64'd2000 * 400000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- regulation
  task automatic regulation();
    int w = 0;
    // Radiation events while the supply is still high: one upset each, in
    // different groups, one window apart.
    for (int i = 0; i < 3; i++) begin
      @(posedge window_done);
      repeat (10) @(posedge clk);
      #(800);
      case (i)
        0: dut.g_grp[0].u_grp.g_bit[1].u_pri.q  = ~dut.g_grp[0].u_grp.g_bit[1].u_pri.q;
        1: dut.g_grp[7].u_grp.g_bit[0].u_pri.q  = ~dut.g_grp[7].u_grp.g_bit[0].u_pri.q;
        default: dut.g_grp[15].u_grp.u_par.q    = ~dut.g_grp[15].u_grp.u_par.q;
      endcase
      #10;
      check(mb_q, exp_q, "upset masked at the outputs");
      n_seu_masked += int'(mb_q == exp_q && dut.err_flag == 1'b0);
    end
    // Voltage regulation until the loop has backed off a few times.
    reg_enable = 1'b1;
    while (n_vup < 4 && w < 600) begin
      @(posedge window_done);
      w++;
    end
    $display("INFO voltage loop settled at %0d mV after %0d windows, path %0d ps, clock %0d ps",
             vdd_mv, w, path_delay(), tclk);
    check(int'(n_vup >= 4), 1, "voltage loop reached the pre-error point");
    check(int'(vdd_mv < 1100 && vdd_mv > 800), 1, "supply settled between floor and nominal");
    // Frequency regulation at the supply reached.
    reg_mode = REG_FREQUENCY;
    w = 0;
    while ((n_fup < 4 || n_fdn < 4) && w < 600) begin
      @(posedge window_done);
      w++;
    end
    $display("INFO frequency loop at period code %0d (clock %0d ps) after %0d windows",
             period_ps, tclk, w);
    reg_enable = 1'b0;
  endtask

  // ------------------------------------------------------------ SPCRC2 register
  task automatic spcrc2_part();
    logic [31:0] v;
    for (int i = 0; i < 320; i++) begin
      @(negedge clk); #(tclk / 4);
      v = $urandom; sp_d = v;
      @(posedge clk); #(tclk / 4);
      check(sp_q, v, "SPCRC2 register sample");
      if (i % 20 == 5) begin   // every node of bit 5 in turn
        // strike one storage node of one bit, in the high phase
        dut.g_sp[5].u_ff.strike[i % 8] = 1'b1;
        #(tclk / 8);
        dut.g_sp[5].u_ff.strike[i % 8] = 1'b0;
        #(tclk / 16);
        check(sp_q, v, "SPCRC2 strike masked");
        n_sp_strike += int'(sp_q == v);
      end
    end
  endtask

  // ------------------------------------------------------------------ ECC RAM
  task automatic ram_op(logic w, int a, data_t v, logic byp);
    @(negedge clk);
    while (!ram_ready) @(negedge clk);
    ram_req = 1'b1; ram_we = w; ram_addr = 13'(a); ram_wdata = v; ram_ecc_bypass = byp;
    @(negedge clk);
    ram_req = 1'b0; ram_we = 1'b0;
  endtask

  task automatic ram_part();
    data_t m [16];
    for (int i = 0; i < 16; i++) begin
      m[i] = $urandom;
      ram_op(1'b1, i * 509, m[i], 1'b0);
    end
    for (int i = 0; i < 16; i++) begin
      if (i % 4 == 1) dut.u_ram.mem[i * 509][i] = ~dut.u_ram.mem[i * 509][i];
      if (i % 4 == 2) begin
        dut.u_ram.mem[i * 509][i]      = ~dut.u_ram.mem[i * 509][i];
        dut.u_ram.mem[i * 509][i + 10] = ~dut.u_ram.mem[i * 509][i + 10];
      end
      ram_op(1'b0, i * 509, '0, 1'b0);
      check(ram_rvalid, 1, "RAM read valid");
      if (i % 4 != 2) check(ram_rdata, m[i], "RAM read data");
      check(ram_sec, (i % 4 == 1), "RAM single-error flag");
      check(ram_ded, (i % 4 == 2), "RAM double-error flag");
      n_sec += int'(ram_sec);
      n_wb  += int'(ram_sec && !ram_ready);
      n_ded += int'(ram_ded);
    end
    // Bypass: flip data bit 0 (codeword position 3) and read it raw.
    dut.u_ram.mem[0][2] = ~dut.u_ram.mem[0][2];
    ram_op(1'b0, 0, '0, 1'b1);
    check(ram_rdata, m[0] ^ 32'h1, "RAM bypass raw data");
    n_bypass += int'(ram_rdata == (m[0] ^ 32'h1));
    ram_op(1'b0, 0, '0, 1'b0);
    check(ram_rdata, m[0], "RAM corrected after bypass");
  endtask

  // --------------------------------------------------------------------- BIST
  task automatic bist_part();
    localparam int LEN = 626 * 160;
    int cycles = 0;
    @(negedge clk);
    bist_start = 1'b1;
    @(negedge clk);
    bist_start = 1'b0;
    cycles = 1;
    while (!bist_done) begin
      if (cycles == LEN + 20) begin
        dut.u_sr.row[100][7]  = ~dut.u_sr.row[100][7];
        dut.u_sr.row[625][159] = ~dut.u_sr.row[625][159];
      end
      @(negedge clk);
      cycles++;
    end
    check(cycles, 2 * LEN + 100 + 2, "BIST run length");
    check(bist_err_count, 2, "BIST upsets counted");
    n_bist_upsets = int'(bist_err_count);
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #5000 rst_n = 1'b1;
    run_data = 1'b1;
    fork
      regulation();
      spcrc2_part();
      ram_part();
      bist_part();
    join
    run_data = 1'b0;
    #5000;
    $display("INFO words=%0d timing_windows=%0d radiation_windows=%0d vdd up/down=%0d/%0d period up/down=%0d/%0d",
             n_words, n_timing, n_rad, n_vup, n_vdn, n_fup, n_fdn);
    $display("INFO seu_masked=%0d spcrc2_strikes=%0d ram sec/writeback/ded/bypass=%0d/%0d/%0d/%0d bist_upsets=%0d",
             n_seu_masked, n_sp_strike, n_sec, n_wb, n_ded, n_bypass, n_bist_upsets);
    check(int'(n_timing > 0), 1, "timing pre-error windows seen");
    check(int'(n_rad > 0), 1, "radiation windows seen");
    check(int'(n_vup > 0 && n_vdn > 0), 1, "supply stepped both ways");
    check(int'(n_fup > 0 && n_fdn > 0), 1, "period stepped both ways");
    check(int'(n_seu_masked > 0), 1, "register upsets masked");
    check(int'(n_sp_strike > 0), 1, "SPCRC2 strikes masked");
    check(int'(n_sec > 0 && n_wb > 0 && n_ded > 0 && n_bypass > 0), 1, "RAM ECC mechanisms seen");
    check(int'(n_bist_upsets > 0), 1, "BIST upsets seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
