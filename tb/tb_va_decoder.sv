// tb_va_decoder: loads random VA bytes into the vector address decoder and
// takes data bytes until done. Checks that each take enables exactly the
// highest remaining VA bit, that the number of takes equals the number of
// set bits (one byte per clock), that last flags the final take and that
// done rises once the VAR is empty.
module tb_va_decoder;
  logic       clk = 0, rst_n = 0;
  logic       load_va = 0, take_byte = 0;
  logic [7:0] va_in = 0, byte_we, var_q;
  logic       last, done;
  int checks = 0, failures = 0;

  va_decoder #(.W(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t var=%b we=%b last=%b done=%b", what, $time, var_q, byte_we, last, done);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(done, "empty after reset");
    for (int t = 0; t < 300; t++) begin
      logic [7:0] va, remaining;
      int ones, takes;
      va = (t < 256) ? 8'(t) : 8'($urandom);
      ones = $countones(va);
      load_va = 1; va_in = va;
      @(posedge clk); #1;
      load_va = 0;
      check(var_q == va, "VAR load");
      remaining = va;
      takes = 0;
      while (!done && takes < 9) begin
        logic [7:0] exp;
        int hi;
        hi = -1;
        for (int b = 7; b >= 0; b--) if (remaining[b] && hi < 0) hi = b;
        exp = '0; exp[hi] = 1'b1;
        take_byte = 1; #1;
        check(byte_we == exp, "byte enable");
        check(last == ($countones(remaining) == 1), "last");
        @(posedge clk); #1;
        take_byte = 0;
        remaining[hi] = 1'b0;
        takes++;
        check(var_q == remaining, "bit cleared");
      end
      check(takes == ones, "one take per set bit");
      check(done, "done after row");
      check(byte_we == 0, "no enable without take");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
