// tb_frame_register: shifts random bytes into a 56-byte frame and checks the
// whole content and the top byte against a queue model after every clock,
// including clocks without shift. A full pass of 56 shifts that feeds the
// top byte back in must leave the frame unchanged.
module tb_frame_register;
  localparam int BYTES = 56;
  logic       clk = 0, rst_n = 0, shift = 0;
  logic [7:0] din = 0, top;
  logic [7:0] q [BYTES];
  logic [7:0] model [BYTES];
  int checks = 0, failures = 0;

  frame_register #(.BYTES(BYTES)) dut (.*);

  always #5 clk = ~clk;

  task automatic compare(input string what);
    bit ok;
    ok = (top == model[0]);
    for (int i = 0; i < BYTES; i++) if (q[i] != model[i]) ok = 0;
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s top=%h model0=%h", what, top, model[0]);
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
    for (int i = 0; i < BYTES; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    compare("reset");
    for (int t = 0; t < 400; t++) begin
      shift = ($urandom_range(3) != 0);
      din = 8'($urandom);
      @(posedge clk); #1;
      if (shift) begin
        for (int i = 0; i < BYTES - 1; i++) model[i] = model[i+1];
        model[BYTES-1] = din;
      end
      shift = 0;
      compare("shift");
    end
    // Rotation: a full pass feeding back the top byte restores the frame.
    for (int t = 0; t < BYTES; t++) begin
      shift = 1; din = top;
      @(posedge clk); #1;
    end
    shift = 0;
    compare("full rotation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
