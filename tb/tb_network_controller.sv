// tb_network_controller: exhaustive check of the VA decoder selection logic.
// For all 256 VAR values it compares the mask register, the one-hot select
// of the highest set bit, done and last with values computed here by
// scanning the bits from the top. Combinational block, so no clock; a
// watchdog still bounds the run.
module tb_network_controller;
  logic [7:0] var_q, mr, sel;
  logic       last, done;
  int checks = 0, failures = 0;

  network_controller #(.W(8)) dut (.var_q(var_q), .mr(mr), .sel(sel), .last(last), .done(done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s var=%b mr=%b sel=%b last=%b done=%b", what, var_q, mr, sel, last, done);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [7:0] exp_mr, exp_sel;
      int hi, ones;
      var_q = 8'(v);
      #1;
      hi = -1; ones = 0;
      for (int b = 7; b >= 0; b--) begin
        if (var_q[b]) begin
          ones++;
          if (hi < 0) hi = b;
        end
      end
      exp_mr = '0; exp_sel = '0;
      if (hi >= 0) begin
        for (int b = hi; b <= 7; b++) exp_mr[b] = 1'b1;
        exp_sel[hi] = 1'b1;
      end
      check(mr == exp_mr, "mr");
      check(sel == exp_sel, "sel");
      check(done == (ones == 0), "done");
      check(last == (ones == 1), "last");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
