// tb_mbff_ecu_mux: exhaustive check of the error computation unit and output
// mux of a 2-bit group (even and odd parity) and a random check of a 4-bit
// group: err must be set exactly when the parity of the primary outputs
// differs from the stored parity, and q must come from the secondaries then.
module tb_mbff_ecu_mux;
  timeunit 1ps; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic [1:0] qp2, qs2, q2e, q2o;
  logic [3:0] qp4, qs4, q4;
  logic       pir, err2e, err2o, err4;

  mbff_ecu_mux #(.N_BITS(2), .EVEN_PARITY(1'b1)) u2e (.qp(qp2), .qs(qs2), .pir, .err(err2e), .q(q2e));
  mbff_ecu_mux #(.N_BITS(2), .EVEN_PARITY(1'b0)) u2o (.qp(qp2), .qs(qs2), .pir, .err(err2o), .q(q2o));
  mbff_ecu_mux #(.N_BITS(4), .EVEN_PARITY(1'b1)) u4  (.qp(qp4), .qs(qs4), .pir, .err(err4),  .q(q4));

  task automatic check(logic [3:0] got, logic [3:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (qp2=%b qs2=%b pir=%b)", what, got, exp, qp2, qs2, pir);
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
    logic exp_even, exp_odd;
    for (int v = 0; v < 32; v++) begin
      {pir, qp2, qs2} = 5'(v);
      #1;
      // Even parity of 2 bits is 1 when they differ; odd parity when equal.
      exp_even = (qp2[0] != qp2[1]) != pir;
      exp_odd  = (qp2[0] == qp2[1]) != pir;
      check(4'(err2e), 4'(exp_even), "2-bit even err");
      check(4'(err2o), 4'(exp_odd),  "2-bit odd err");
      check(4'(q2e), 4'(exp_even ? qs2 : qp2), "2-bit even q");
      check(4'(q2o), 4'(exp_odd  ? qs2 : qp2), "2-bit odd q");
    end
    for (int i = 0; i < 64; i++) begin
      qp4 = 4'($urandom); qs4 = 4'($urandom); pir = 1'($urandom);
      #1;
      exp_even = ((qp4[0] + qp4[1] + qp4[2] + qp4[3]) % 2 == 1) != pir;
      check(4'(err4), 4'(exp_even), "4-bit err");
      check(q4, exp_even ? qs4 : qp4, "4-bit q");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
