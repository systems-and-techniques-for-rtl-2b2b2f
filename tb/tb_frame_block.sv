// tb_frame_block: exercises a full eight-frame block and a two-frame
// remainder block. Checks that only a selected block shifts, that each frame
// takes its own byte of the write-back row at the bottom, that the top row
// appears on the read buses only while selected, and that absent frame
// positions of the short block read as zero.
module tb_frame_block;
  import dmava_pkg::*;
  localparam int BYTES = 56;
  logic clk = 0, rst_n = 0;
  logic sel8 = 0, sel2 = 0, shift = 0;
  row_t wb_row = '0, top8, top2;
  logic [7:0] q8 [8][BYTES];
  logic [7:0] q2 [2][BYTES];
  logic [7:0] m8 [8][BYTES];
  logic [7:0] m2 [2][BYTES];
  int checks = 0, failures = 0;

  frame_block #(.N_FRAMES(8), .BYTES(BYTES)) dut8 (
    .clk(clk), .rst_n(rst_n), .sel(sel8), .shift(shift), .wb_row(wb_row), .top_row(top8), .q(q8));
  frame_block #(.N_FRAMES(2), .BYTES(BYTES)) dut2 (
    .clk(clk), .rst_n(rst_n), .sel(sel2), .shift(shift), .wb_row(wb_row), .top_row(top2), .q(q2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  task automatic compare();
    bit ok8 = 1, ok2 = 1, okt8 = 1, okt2 = 1;
    for (int f = 0; f < 8; f++) for (int i = 0; i < BYTES; i++) if (q8[f][i] != m8[f][i]) ok8 = 0;
    for (int f = 0; f < 2; f++) for (int i = 0; i < BYTES; i++) if (q2[f][i] != m2[f][i]) ok2 = 0;
    for (int f = 0; f < 8; f++) if (top8[f] != (sel8 ? m8[f][0] : 8'h00)) okt8 = 0;
    for (int f = 0; f < 8; f++) if (top2[f] != ((sel2 && f < 2) ? m2[f][0] : 8'h00)) okt2 = 0;
    check(ok8, "block8 content");
    check(ok2, "block2 content");
    check(okt8, "block8 read buses");
    check(okt2, "block2 read buses");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 8; f++) for (int i = 0; i < BYTES; i++) m8[f][i] = '0;
    for (int f = 0; f < 2; f++) for (int i = 0; i < BYTES; i++) m2[f][i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      sel8 = $urandom_range(1); sel2 = $urandom_range(1);
      shift = $urandom_range(1);
      wb_row = {$urandom, $urandom};
      #1;
      compare();
      @(posedge clk); #1;
      if (shift && sel8) for (int f = 0; f < 8; f++) begin
        for (int i = 0; i < BYTES - 1; i++) m8[f][i] = m8[f][i+1];
        m8[f][BYTES-1] = wb_row[f];
      end
      if (shift && sel2) for (int f = 0; f < 2; f++) begin
        for (int i = 0; i < BYTES - 1; i++) m2[f][i] = m2[f][i+1];
        m2[f][BYTES-1] = wb_row[f];
      end
      shift = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
