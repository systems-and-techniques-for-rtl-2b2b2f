// dmava_config_memory: DMA-VA configuration memory of an SRAM-style FPGA.
//
// Partial reconfiguration only rewrites the configuration bytes that change.
// Frames (columns of FRAME_BYTES bytes, kept as shift registers) are grouped
// eight to a block. A run names a start block and a count of consecutive
// blocks (DMA addressing); for every row of every block an 8-bit vector
// address (VA) says which of the block's eight frames get a new byte in that
// row, and only those bytes follow on the port. Each row is read from the
// top of the block's frames into the 8-byte frame data register (FDR),
// patched there, and written back at the bottom while the frames shift up
// by one, so after a full pass the frames are back in place.
//
// Parts: main_controller (stream sequencing), va_decoder with its
// network_controller (VAR and byte steering), frame_data_register,
// block_address_decoder, and N_BLOCKS frame_block instances (the last one
// holding the remainder when NUM_FRAMES is not a multiple of eight).
//
// Interface: cfg_valid/cfg_data is the 8-bit configuration port, one byte
// per clock, no back-pressure (the memory never stalls the port). busy is
// high during a run, op_done pulses when a run ends. cfg_bits is the
// content of every frame (frame f, byte r), the connection to the logic
// fabric. Synchronous active-low reset clears the whole memory.
// Defaults are an XCV100: 1610 frames of 56 bytes. The structure follows
// the document; the stream layout, reset and port handshake are this
// design's choices.
module dmava_config_memory
  import dmava_pkg::*;
#(
  parameter int unsigned NUM_FRAMES  = XCV100_FRAMES,
  parameter int unsigned FRAME_BYTES = XCV100_BYTES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cfg_valid,
  input  cbyte_t     cfg_data,
  output logic       busy,
  output logic       op_done,
  output logic [7:0] cfg_bits [NUM_FRAMES][FRAME_BYTES]
);

  localparam int unsigned N_BLOCKS = num_blocks(NUM_FRAMES);
  localparam int unsigned LAST_N   = NUM_FRAMES - (N_BLOCKS - 1) * FRAMES_PER_BLOCK;

  // Controller and decoder wiring.
  logic                        load_va, take_byte, load_row, wb_shift;
  logic                        blk_en;
  logic [FIELD_W-1:0]          blk_addr;
  logic [N_BLOCKS-1:0]         blk_sel;
  logic [FRAMES_PER_BLOCK-1:0] byte_we;
  logic                        vad_last, vad_done;
  row_t                        rd_row, wb_row;
  row_t                        blk_top [N_BLOCKS];

  main_controller #(.ROWS(FRAME_BYTES)) u_main (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_valid (cfg_valid),
    .cfg_data  (cfg_data),
    .vad_last  (vad_last),
    .vad_done  (vad_done),
    .load_va   (load_va),
    .take_byte (take_byte),
    .load_row  (load_row),
    .wb_shift  (wb_shift),
    .blk_en    (blk_en),
    .blk_addr  (blk_addr),
    .busy      (busy),
    .op_done   (op_done),
    .state     ()
  );

  va_decoder #(.W(FRAMES_PER_BLOCK)) u_vad (
    .clk       (clk),
    .rst_n     (rst_n),
    .load_va   (load_va),
    .va_in     (cfg_data),
    .take_byte (take_byte),
    .byte_we   (byte_we),
    .var_q     (),
    .last      (vad_last),
    .done      (vad_done)
  );

  frame_data_register u_fdr (
    .clk      (clk),
    .rst_n    (rst_n),
    .load_row (load_row),
    .rd_row   (rd_row),
    .byte_we  (byte_we),
    .din      (cfg_data),
    .q        (),
    .wb_row   (wb_row)
  );

  block_address_decoder #(.N_BLOCKS(N_BLOCKS), .AW(FIELD_W)) u_bad (
    .en   (blk_en),
    .addr (blk_addr),
    .sel  (blk_sel)
  );

  for (genvar b = 0; b < int'(N_BLOCKS); b++) begin : g_block
    localparam int unsigned NF = (b == int'(N_BLOCKS) - 1) ? LAST_N : FRAMES_PER_BLOCK;
    logic [7:0] bq [NF][FRAME_BYTES];

    frame_block #(.N_FRAMES(NF), .BYTES(FRAME_BYTES)) u_block (
      .clk     (clk),
      .rst_n   (rst_n),
      .sel     (blk_sel[b]),
      .shift   (wb_shift),
      .wb_row  (wb_row),
      .top_row (blk_top[b]),
      .q       (bq)
    );

    for (genvar j = 0; j < int'(NF); j++) begin : g_out
      assign cfg_bits[b*FRAMES_PER_BLOCK + j] = bq[j];
    end
  end

  // Horizontal read buses: only the selected block drives a non-zero row.
  always_comb begin
    rd_row = '0;
    for (int b = 0; b < int'(N_BLOCKS); b++) rd_row |= blk_top[b];
  end

endmodule
