// dmava_pkg: constants and types shared by the DMA-VA configuration memory.
//
// The memory is organised as frames of FRAME_BYTES bytes, grouped into
// blocks of FRAMES_PER_BLOCK frames. The configuration port is PORT_W bits
// wide, and the vector address (VA) for one row of a block is one port word,
// so FRAMES_PER_BLOCK equals PORT_W (c = 8). The default device is the size
// of an XCV100: 1610 frames of 56 bytes (90,160 bytes). The stream header
package dmava_pkg;

  localparam int unsigned PORT_W           = 8;
  localparam int unsigned FRAMES_PER_BLOCK = PORT_W;
  localparam int unsigned XCV100_FRAMES    = 1610;
  localparam int unsigned XCV100_BYTES     = 56;
  localparam int unsigned FIELD_W          = 16;

  typedef logic [PORT_W-1:0] cbyte_t;                      // one configuration byte
  typedef logic [FRAMES_PER_BLOCK-1:0][PORT_W-1:0] row_t; // one row across a block

  // Main controller states.
  typedef enum logic [1:0] {
    ST_HDR  = 2'd0,   // receiving the header (start block, block count)
    ST_VA   = 2'd1,   // next port byte is the VA byte of a row
    ST_DATA = 2'd2    // next port byte is a frame data byte of the current row
  } ctrl_state_t;

  function automatic int unsigned num_blocks(int unsigned frames);
    return (frames + FRAMES_PER_BLOCK - 1) / FRAMES_PER_BLOCK;
  endfunction

endpackage
