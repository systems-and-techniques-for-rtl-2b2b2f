// block_address_decoder: block address decoder (BAD).
//
// Turns the block address held by the main controller into a one-hot select
// of one of N_BLOCKS frame blocks. An address at or past N_BLOCKS, or en
// low, selects no block, so a stream aimed past the end of the device is
// consumed without changing any frame (that rule is this design's choice).
// Purely combinational.
module block_address_decoder #(
  parameter int unsigned N_BLOCKS = 202,
  parameter int unsigned AW       = 16
) (
  input  logic                en,
  input  logic [AW-1:0]       addr,
  output logic [N_BLOCKS-1:0] sel
);

  always_comb begin
    sel = '0;
    for (int b = 0; b < int'(N_BLOCKS); b++) begin
      sel[b] = en && (addr == AW'(b));
    end
  end

endmodule
