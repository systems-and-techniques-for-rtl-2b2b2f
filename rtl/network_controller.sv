// network_controller: selection logic of the vector address decoder.
//
// From the W-bit vector address register (VAR) it builds the mask register
//   MR[W-1] = OR of all VAR bits
//   MR[j]   = ~VAR[j+1] & MR[j+1]          (W-2 >= j >= 0)
// so MR[j] is set exactly when VAR is not empty and no VAR bit above j is
// set. The one-hot select sel picks the highest set VAR bit: it enables the
// buffer that drives the port byte into that byte of the frame data register.
// The main controller clears that VAR bit and the cycle repeats, so data
// bytes for a row arrive in descending frame order. done is the NOR of VAR.
// last flags that the selected bit is the only one left, which lets the
// caller write the row back in the cycle that consumes its last byte.
// Purely combinational; MR and done follow the document, sel is formed as
// MR[j] & VAR[j] (the edge of the mask), last is this design's addition.
module network_controller #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] var_q,
  output logic [W-1:0] mr,
  output logic [W-1:0] sel,
  output logic         last,
  output logic         done
);

  always_comb begin
    mr[W-1] = |var_q;
    for (int j = int'(W) - 2; j >= 0; j--) begin
      mr[j] = ~var_q[j+1] & mr[j+1];
    end
  end

  assign sel  = mr & var_q;
  assign done = ~|var_q;
  assign last = ~done && ((var_q & ~sel) == '0);

endmodule
