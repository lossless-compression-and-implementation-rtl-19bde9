// deserializer: serial-to-parallel converter on the receive side.
//
// Shifts in one bit per bit_valid, MSB first. After W bits, word_out holds
// the word and word_valid pulses for one clock; the next bit starts a new
// word. Always ready. Synchronous, active-high reset clears the bit count.
//
// The source design shows only a deserializer feeding a bank of flip-flops;
// bit order and width are this design's choices, matching serializer.
module deserializer #(
  parameter int unsigned W = 18
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         bit_in,
  input  logic         bit_valid,
  output logic [W-1:0] word_out,
  output logic         word_valid
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-2:0]  shreg;     // bits received so far
  logic [CW-1:0] got;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg      <= '0;
      got        <= '0;
      word_out   <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (bit_valid) begin
        if (got == CW'(W - 1)) begin
          word_out   <= {shreg[W-2:0], bit_in};
          word_valid <= 1'b1;
          got        <= '0;
        end else begin
          got <= got + CW'(1);
        end
        shreg <= {shreg[W-3:0], bit_in};
      end
    end
  end
endmodule
