// frame_block: a group of up to eight frames that share one block select.
//
// Frame j of the block (0 <= j < N_FRAMES) connects to horizontal read bus j
// and to write-back bus j. While sel is high the block drives the top byte
// of each frame onto the read buses (top_row; an unselected block drives
// zero, so the buses of all blocks combine with an OR, the equivalent of
// the shared bus). When sel and shift are both high, every frame shifts up
// one byte and takes byte j of wb_row at its bottom. The last block of a
// device whose frame count is not a multiple of eight has fewer frames
// (N_FRAMES < 8); its unused bus positions read as zero and ignore writes.
// Eight frames per block follows the document (c = 8); the OR-combined
// bus in place of a tri-state bus is this design's choice.
// Timing: top_row is combinational; frames shift on the rising clock edge.
module frame_block
  import dmava_pkg::*;
#(
  parameter int unsigned N_FRAMES = 8,
  parameter int unsigned BYTES    = 56
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sel,
  input  logic       shift,
  input  row_t       wb_row,
  output row_t       top_row,
  output logic [7:0] q [N_FRAMES][BYTES]
);

  logic [7:0] frame_top [N_FRAMES];

  for (genvar j = 0; j < int'(N_FRAMES); j++) begin : g_frame
    frame_register #(.BYTES(BYTES)) u_frame (
      .clk   (clk),
      .rst_n (rst_n),
      .shift (sel & shift),
      .din   (wb_row[j]),
      .top   (frame_top[j]),
      .q     (q[j])
    );
  end

  always_comb begin
    top_row = '0;
    if (sel) begin
      for (int j = 0; j < int'(N_FRAMES); j++) top_row[j] = frame_top[j];
    end
  end

  initial begin
    assert (N_FRAMES >= 1 && N_FRAMES <= FRAMES_PER_BLOCK)
      else $error("frame_block: N_FRAMES must be 1..%0d", FRAMES_PER_BLOCK);
  end

endmodule
