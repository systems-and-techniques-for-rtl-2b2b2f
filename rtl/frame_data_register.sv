// frame_data_register: the 8-byte frame data register (FDR).
//
// Read-modify-write buffer between the configuration port and one row of
// the selected frame block. load_row copies the top byte of each of the
// block's frames (rd_row, from the horizontal read buses) into the FDR;
// byte_we overwrites single bytes with the port byte din. wb_row is the
// value the FDR takes in this cycle (the register after this cycle's
// load or byte writes), and drives the bottom write-back buses, so a row can
// be written back in the same cycle as its last byte arrives. That bypass is
// this design's choice; the document only requires that rows be read and
// written in one cycle each. q is the registered content.
// Timing: q updates on the rising clock edge; wb_row is combinational.
// load_row and byte_we are not used in the same cycle.
module frame_data_register
  import dmava_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        load_row,
  input  row_t                        rd_row,
  input  logic [FRAMES_PER_BLOCK-1:0] byte_we,
  input  cbyte_t                      din,
  output row_t                        q,
  output row_t                        wb_row
);

  always_comb begin
    if (load_row) begin
      wb_row = rd_row;
    end else begin
      wb_row = q;
      for (int j = 0; j < int'(FRAMES_PER_BLOCK); j++) begin
        if (byte_we[j]) wb_row[j] = din;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) q <= '0;
    else        q <= wb_row;
  end

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(load_row && (byte_we != '0)));

endmodule
