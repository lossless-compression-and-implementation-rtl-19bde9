// transition_counter: the "Check Transitions" step of the transition
// inversion encoder.
//
// Counts how many neighbouring bit pairs (word[i], word[i+1]) differ, i.e.
// how many level changes the word makes when it is sent bit by bit. A W-bit
// word has W-1 such pairs, so the count runs from 0 to W-1.
// Purely combinational: XOR of neighbours, then a population count.
// Counting only inside the word (not against the previous word's last bit)
// is this design's choice.
module transition_counter #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]         word,
  output logic [$clog2(W)-1:0] count
);
  always_comb begin
    count = '0;
    for (int i = 0; i < W - 1; i++)
      count = count + $clog2(W)'(word[i] ^ word[i+1]);
  end
endmodule
