// tb_ecc_ram: checks the SECDED RAM on a 64-word array - write/read-back with
// one-cycle read latency, correction of a single flipped bit at every one of
// the 39 codeword positions with write-back (ready low for that cycle, clean
// on the next read), detection of double flips, and the bypass mode that
// returns the raw stored bits. Bits are flipped straight in the array.
module tb_ecc_ram;
  timeunit 1ps; timeprecision 1ps;
  import secded_pkg::*;

  localparam int AW = 6;

  int checks = 0, failures = 0;
  int n_sec = 0, n_ded = 0, n_wb = 0;
  logic          clk = 1'b0, rst_n = 1'b1;
  logic          req = 1'b0, we = 1'b0, ecc_bypass = 1'b0;
  logic [AW-1:0] addr = '0;
  data_t         wdata = '0;
  logic          ready, rvalid, sec, ded;
  data_t         rdata;
  data_t         model [1 << AW];

  ecc_ram #(.ADDR_W(AW)) dut (.clk, .rst_n, .req, .we, .addr, .wdata, .ecc_bypass,
                              .ready, .rvalid, .rdata, .sec, .ded);

  always #500 clk = ~clk;

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic write(int a, data_t v);
    @(negedge clk);
    req = 1'b1; we = 1'b1; addr = AW'(a); wdata = v;
    @(negedge clk);
    req = 1'b0; we = 1'b0;
    model[a] = v;
  endtask

  // Read one word; returns data and flags seen in the result cycle, and
  // whether ready dropped in that cycle.
  task automatic read(int a, output data_t v, output logic s, output logic dd, output logic stall);
    @(negedge clk);
    req = 1'b1; we = 1'b0; addr = AW'(a);
    @(negedge clk);
    req = 1'b0;
    check(rvalid, 1, "read data one cycle after the request");
    v = rdata; s = sec; dd = ded; stall = !ready;
    @(negedge clk);
  endtask

  initial begin : watchdog
    #(20000 * 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t v; logic s, dd, st;
    #1 rst_n = 1'b0;
    #2000 rst_n = 1'b1;
    for (int a = 0; a < (1 << AW); a++) write(a, $urandom);
    for (int a = 0; a < (1 << AW); a++) begin
      read(a, v, s, dd, st);
      check(v, model[a], "clean read");
      check(s, 0, "no sec on clean word");
      check(dd, 0, "no ded on clean word");
    end
    // Single flips at every codeword position.
    for (int b = 0; b < 39; b++) begin
      int a = b % (1 << AW);
      dut.mem[a][b] = ~dut.mem[a][b];
      read(a, v, s, dd, st);
      check(v, model[a], "single error corrected");
      check(s, 1, "sec flagged");
      check(dd, 0, "no ded for single error");
      check(st, 1, "ready low during write-back");
      n_sec += int'(s); n_wb += int'(st);
      read(a, v, s, dd, st);
      check(s, 0, "word clean after write-back");
      check(v, model[a], "data after write-back");
    end
    // Double flips.
    for (int i = 0; i < 20; i++) begin
      int a = i, b0 = $urandom % 39, b1;
      b1 = (b0 + 1 + ($urandom % 38)) % 39;
      dut.mem[a][b0] = ~dut.mem[a][b0];
      dut.mem[a][b1] = ~dut.mem[a][b1];
      read(a, v, s, dd, st);
      check(dd, 1, "double error detected");
      check(s, 0, "double error not corrected");
      check(st, 0, "no write-back on double error");
      n_ded += int'(dd);
      write(a, model[a]);
    end
    // Bypass: data bit 0 sits at codeword position 3 (cw[2]).
    ecc_bypass = 1'b1;
    dut.mem[5][2] = ~dut.mem[5][2];
    read(5, v, s, dd, st);
    check(v, model[5] ^ 32'h1, "bypass returns raw bits");
    check(s, 0, "bypass: no flags");
    check(st, 0, "bypass: no write-back");
    ecc_bypass = 1'b0;
    read(5, v, s, dd, st);
    check(v, model[5], "ECC back on: corrected");
    check(int'(n_sec > 0 && n_ded > 0 && n_wb > 0), 1, "every mechanism seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
