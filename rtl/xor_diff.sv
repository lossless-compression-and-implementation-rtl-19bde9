// xor_diff: XOR network that puts a frame into transition form.
//
// diff[i] = word[i] ^ word[i+1] for i < W-1, and diff[W-1] = word[W-1].
// A '1' in diff marks a level change in the serial stream. After
// transition inversion a frame has few changes, so diff is mostly zeros:
// long zero runs for the run-length coder. Lossless; xor_undiff is the
// inverse. Combinational.
// The source design shows a network of two-input XORs at this point; this
// neighbour-XOR wiring is this design's reading of it.
module xor_diff #(
  parameter int unsigned W = 18
) (
  input  logic [W-1:0] word,
  output logic [W-1:0] diff
);
  always_comb begin
    diff[W-1] = word[W-1];
    for (int i = 0; i < W - 1; i++) diff[i] = word[i] ^ word[i+1];
  end
endmodule
