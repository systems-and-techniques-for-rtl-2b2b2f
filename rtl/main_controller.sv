// main_controller: sequencer of the DMA-VA configuration memory.
//
// It reads the byte stream arriving on the 8-bit configuration port (one
// byte per clock while cfg_valid is high) and routes each byte either to
// its own header registers, to the VA decoder, or to the frame data
// register. A configuration run is:
//   header : start block address (16 bits) and number of consecutive
//            blocks (16 bits), each sent high byte first;
//   then, for each block and for each of its ROWS rows, top row first:
//            one VA byte, followed by one data byte per set VA bit.
// The DMA-style header (first block + count of consecutive blocks) and the
// per-row VA byte follow the document; the field widths and byte order are
// this design's choice. A count of zero ends the run at once.
//
// Per row: the VA byte cycle loads the VAR and reads the block's top row
// into the FDR (load_row). Each data byte cycle writes one FDR byte
// (take_byte). The row is written back and the block's frames shift
// (wb_shift) in the cycle of the row's last data byte, or in the VA byte
// cycle itself if the VA byte is zero. No cycle is spent without a port
// byte, so a run takes exactly as many clocks as it has bytes.
// After ROWS rows the block's frames are back in place and the block
// address advances. op_done pulses for one clock when a run ends.
module main_controller
  import dmava_pkg::*;
#(
  parameter int unsigned ROWS = 56
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_valid,
  input  cbyte_t             cfg_data,
  input  logic               vad_last,
  input  logic               vad_done,
  output logic               load_va,
  output logic               take_byte,
  output logic               load_row,
  output logic               wb_shift,
  output logic               blk_en,
  output logic [FIELD_W-1:0] blk_addr,
  output logic               busy,
  output logic               op_done,
  output ctrl_state_t        state
);

  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1;

  logic [1:0]           hdr_idx;
  cbyte_t               hdr_b0, hdr_b1, hdr_b2;
  logic [FIELD_W-1:0]   blocks_left;
  logic [RW-1:0]        row;
  logic                 row_complete;
  logic                 last_row;
  logic [FIELD_W-1:0]   hdr_count;

  assign hdr_count = {hdr_b2, cfg_data};

  always_comb begin
    load_va   = 1'b0;
    load_row  = 1'b0;
    take_byte = 1'b0;
    wb_shift  = 1'b0;
    if (cfg_valid) begin
      unique case (state)
        ST_VA: begin
          load_va  = 1'b1;
          load_row = 1'b1;
          wb_shift = (cfg_data == '0);
        end
        ST_DATA: begin
          take_byte = 1'b1;
          wb_shift  = vad_last;
        end
        default: ;
      endcase
    end
  end

  assign row_complete = wb_shift;
  assign last_row     = (row == RW'(ROWS - 1));
  assign blk_en       = (state != ST_HDR);
  assign busy         = blk_en;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= ST_HDR;
      hdr_idx     <= '0;
      hdr_b0      <= '0;
      hdr_b1      <= '0;
      hdr_b2      <= '0;
      blocks_left <= '0;
      blk_addr    <= '0;
      row         <= '0;
      op_done     <= 1'b0;
    end else begin
      op_done <= 1'b0;
      if (cfg_valid) begin
        unique case (state)
          ST_HDR: begin
            hdr_idx <= hdr_idx + 2'd1;
            case (hdr_idx)
              2'd0:    hdr_b0 <= cfg_data;
              2'd1:    hdr_b1 <= cfg_data;
              2'd2:    hdr_b2 <= cfg_data;
              default: begin
                blk_addr    <= {hdr_b0, hdr_b1};
                blocks_left <= hdr_count;
                row         <= '0;
                if (hdr_count == '0) op_done <= 1'b1;
                else                 state   <= ST_VA;
              end
            endcase
          end
          ST_VA, ST_DATA: begin
            if (state == ST_VA && !row_complete) state <= ST_DATA;
            if (row_complete) begin
              state <= ST_VA;
              if (last_row) begin
                row <= '0;
                if (blocks_left == FIELD_W'(1)) begin
                  state   <= ST_HDR;
                  op_done <= 1'b1;
                end else begin
                  blocks_left <= blocks_left - FIELD_W'(1);
                  blk_addr    <= blk_addr + FIELD_W'(1);
                end
              end else begin
                row <= row + RW'(1);
              end
            end
          end
          default: state <= ST_HDR;
        endcase
      end
    end
  end

  // In a data cycle the VAR must still hold at least one set bit.
  a_data_needs_va: assert property (@(posedge clk) disable iff (!rst_n)
                                    (state == ST_DATA) |-> !vad_done);

endmodule
