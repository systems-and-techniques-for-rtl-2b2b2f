// tb_block_address_decoder: sweeps every address up to past the last block
// of an XCV100-sized device (202 blocks) and checks a one-hot select of the
// addressed block, no select past the end, and none while disabled.
module tb_block_address_decoder;
  localparam int NB = 202;
  logic          en = 0;
  logic [15:0]   addr = 0;
  logic [NB-1:0] sel;
  int checks = 0, failures = 0;

  block_address_decoder #(.N_BLOCKS(NB), .AW(16)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s en=%b addr=%0d", what, en, addr);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 300; a++) begin
      logic [NB-1:0] exp;
      addr = 16'(a);
      en = 1; #1;
      exp = '0;
      if (a < NB) exp[a] = 1'b1;
      check(sel == exp, "select");
      en = 0; #1;
      check(sel == '0, "disabled");
    end
    addr = 16'hffff; en = 1; #1;
    check(sel == '0, "far address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
