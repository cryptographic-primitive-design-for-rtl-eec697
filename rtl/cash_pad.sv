// cash_pad - sponge padding M || 1 || 0* for one message block.
//
// Message bits enter left-aligned, the first bit of the message in the most
// significant bit of the block (this design's bit order). For a block with
// nbits valid bits (0 <= nbits < W) the output keeps those bits, puts a single
// 1 right below them at bit W-1-nbits and clears everything further down.
// A full block (nbits = W) passes unchanged; the sponge then appends a
// separate block 1 || 0^(W-1), which is this module's output for nbits = 0.
//
// Purely combinational.
module cash_pad #(
  parameter int unsigned W  = 192,
  parameter int unsigned BW = $clog2(W + 1)
) (
  input  logic [W-1:0]  data,   // message bits, left-aligned
  input  logic [BW-1:0] nbits,  // number of valid bits, 0..W
  output logic [W-1:0]  padded
);

  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      // Bit i holds message bit (W-1-i) of the block.
      if (W - 1 - i < 32'(nbits))       padded[i] = data[i];
      else if (W - 1 - i == 32'(nbits)) padded[i] = 1'b1;
      else                         padded[i] = 1'b0;
    end
  end

endmodule
