// frame_register: one configuration frame, kept as a byte-wide shift register.
//
// The frame holds BYTES bytes; q[0] is the top byte, the one the horizontal
// read bus sees. On shift every byte moves up one place (q[i] <= q[i+1]) and
// din, the write-back byte from the frame data register, enters at the
// bottom (q[BYTES-1]). A full pass of BYTES shifts, one per row of a block,
// returns every byte to its original place, so row r of the frame is q[r]
// whenever no pass is in progress. The whole content drives the logic
// fabric through q. Keeping frames as shift registers follows the document;
// the synchronous active-low clear to zero is this design's choice.
// Timing: one shift per rising clock edge while shift is high.
module frame_register #(
  parameter int unsigned BYTES = 56
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       shift,
  input  logic [7:0] din,
  output logic [7:0] top,
  output logic [7:0] q [BYTES]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(BYTES); i++) q[i] <= '0;
    end else if (shift) begin
      for (int i = 0; i < int'(BYTES) - 1; i++) q[i] <= q[i+1];
      q[BYTES-1] <= din;
    end
  end

  assign top = q[0];

endmodule
