// tb_frame_data_register: drives parallel row loads and single-byte writes
// into the FDR and compares q and the write-back row with a model row kept
// in the testbench.
module tb_frame_data_register;
  import dmava_pkg::*;
  logic   clk = 0, rst_n = 0;
  logic   load_row = 0;
  row_t   rd_row = '0, q, wb_row, model;
  logic [7:0] byte_we = 0;
  cbyte_t din = 0;
  int checks = 0, failures = 0;

  frame_data_register dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s q=%h wb=%h model=%h", what, q, wb_row, model);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    model = '0;
    check(q == model, "reset");
    for (int t = 0; t < 500; t++) begin
      if ($urandom_range(3) == 0) begin
        rd_row = {$urandom, $urandom};
        load_row = 1; byte_we = 0;
        model = rd_row;
      end else begin
        int j;
        j = $urandom_range(7);
        load_row = 0; byte_we = 8'(1 << j); din = 8'($urandom);
        model[j] = din;
      end
      #1;
      check(wb_row == model, "write-back row is next value");
      @(posedge clk); #1;
      load_row = 0; byte_we = 0;
      check(q == model, "registered row");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
