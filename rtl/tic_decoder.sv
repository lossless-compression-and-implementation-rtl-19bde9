// tic_decoder: transition inversion decoder for one data word.
//
// Stage 1 ("Retrieve Decision bit") registers the received word and its
// decision bit. Stage 2 ("decoder") undoes the inversion of every second bit
// when the decision bit is set (b2inv, which is its own inverse) and
// registers the original word.
//
// Interface: in/dec/in_valid in, out/out_valid out. One word per clock,
// latency 2 clocks, no backpressure. Synchronous, active-high reset clears
// the valid bits.
//
// The use of the decision bit to decode and the two register stages follow
// the source design's block diagram; the bits inverted match tic_encoder,
// which is this design's choice.
module tic_decoder #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] in,
  input  logic         dec,
  output logic         out_valid,
  output logic [W-1:0] out
);
  logic [W-1:0] word_q, plain;
  logic         dec_q, valid_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_q <= 1'b0;
      word_q  <= '0;
      dec_q   <= 1'b0;
    end else begin
      valid_q <= in_valid;
      if (in_valid) begin
        word_q <= in;
        dec_q  <= dec;
      end
    end
  end

  b2inv #(.W(W)) u_inv (.word(word_q), .inv(dec_q), .out(plain));

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= valid_q;
      if (valid_q) out <= plain;
    end
  end
endmodule
