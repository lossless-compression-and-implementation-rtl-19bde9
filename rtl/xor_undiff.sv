// xor_undiff: inverse of xor_diff on the receive side.
//
// Rebuilds the frame from its transition form, MSB first:
// word[W-1] = diff[W-1], word[i] = diff[i] ^ word[i+1]. This is an XOR
// chain (a prefix XOR from the top bit down). Combinational.
module xor_undiff #(
  parameter int unsigned W = 18
) (
  input  logic [W-1:0] diff,
  output logic [W-1:0] word
);
  always_comb begin
    word[W-1] = diff[W-1];
    for (int i = W - 2; i >= 0; i--) word[i] = diff[i] ^ word[i+1];
  end
endmodule
