// va_decoder: vector address decoder (VAD) of the DMA-VA memory.
//
// Holds the VA byte of the current row in the vector address register
// (VAR). Bit j set means byte j of the frame data register (the current row
// of frame j of the selected block) is replaced from the configuration port.
// Each accepted data byte is steered to the FDR byte chosen by the network
// controller (the highest set VAR bit) and that bit is cleared, so a row
// with k set bits consumes exactly k data bytes, one per clock.
//
// Interface: load_va writes va_in into VAR; take_byte clears the selected
// bit. byte_we is the one-hot FDR byte enable, valid while take_byte is
// high. done = VAR empty; last = the selected byte is the row's final one.
// Timing: VAR updates on the rising clock edge; byte_we, last and done are
// combinational from VAR. Synchronous active-low reset empties VAR (the
// reset is this design's choice).
module va_decoder #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_va,
  input  logic [W-1:0] va_in,
  input  logic         take_byte,
  output logic [W-1:0] byte_we,
  output logic [W-1:0] var_q,
  output logic         last,
  output logic         done
);

  logic [W-1:0] mr;
  logic [W-1:0] sel;

  network_controller #(.W(W)) u_nc (
    .var_q (var_q),
    .mr    (mr),
    .sel   (sel),
    .last  (last),
    .done  (done)
  );

  assign byte_we = take_byte ? sel : '0;

  always_ff @(posedge clk) begin
    if (!rst_n)         var_q <= '0;
    else if (load_va)   var_q <= va_in;
    else if (take_byte) var_q <= var_q & ~sel;
  end

  // A data byte is only taken while the VAR still has a set bit.
  a_take_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
                                    take_byte |-> !done);
  a_no_overlap:    assert property (@(posedge clk) disable iff (!rst_n)
                                    !(load_va && take_byte));

endmodule
