// b2inv: transition inversion of a word (the "B2INV" step).
//
// When inv is set, every second bit (positions 1, 3, 5, ...) is inverted.
// Flipping alternate bits turns each transition between neighbouring bits
// into a non-transition and each non-transition into a transition, so a
// W-bit word with t transitions leaves with W-1-t. Applying the block twice
// with the same inv gives back the input, so the encoder and the decoder
// use the same block. Combinational.
// The source design names this step but does not give which bits are
// flipped; inverting the odd positions is this design's reading.
module b2inv #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] word,
  input  logic         inv,
  output logic [W-1:0] out
);
  logic [W-1:0] odd_mask;

  always_comb begin
    for (int i = 0; i < W; i++) odd_mask[i] = i[0];
    out = inv ? (word ^ odd_mask) : word;
  end
endmodule
