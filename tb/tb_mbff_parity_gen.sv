// tb_mbff_parity_gen: checks the parity generator exhaustively for 2 and
// 4 bits and on random words for 8 bits, even and odd, against a bit-by-bit
// count of ones.
module tb_mbff_parity_gen;
  timeunit 1ps; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic [1:0] d2;
  logic [3:0] d4;
  logic [7:0] d8;
  logic p2e, p2o, p4e, p8e, p8o;

  mbff_parity_gen #(.N_BITS(2), .EVEN_PARITY(1'b1)) u2e (.d(d2), .p(p2e));
  mbff_parity_gen #(.N_BITS(2), .EVEN_PARITY(1'b0)) u2o (.d(d2), .p(p2o));
  mbff_parity_gen #(.N_BITS(4), .EVEN_PARITY(1'b1)) u4e (.d(d4), .p(p4e));
  mbff_parity_gen #(.N_BITS(8), .EVEN_PARITY(1'b1)) u8e (.d(d8), .p(p8e));
  mbff_parity_gen #(.N_BITS(8), .EVEN_PARITY(1'b0)) u8o (.d(d8), .p(p8o));

  function automatic logic odd_ones(logic [7:0] v, int n);
    int c = 0;
    for (int i = 0; i < n; i++) c += int'(v[i]);
    return logic'(c % 2);
  endfunction

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      d2 = 2'(v); #1;
      check(p2e, odd_ones(8'(v), 2), "2-bit even");
      check(p2o, ~odd_ones(8'(v), 2), "2-bit odd");
    end
    for (int v = 0; v < 16; v++) begin
      d4 = 4'(v); #1;
      check(p4e, odd_ones(8'(v), 4), "4-bit even");
    end
    for (int i = 0; i < 100; i++) begin
      d8 = 8'($urandom); #1;
      check(p8e, odd_ones(d8, 8), "8-bit even");
      check(p8o, ~odd_ones(d8, 8), "8-bit odd");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
