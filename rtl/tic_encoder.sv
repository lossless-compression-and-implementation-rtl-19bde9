// tic_encoder: transition inversion encoder for one data word.
//
// Stage 1 ("Buffer" + "Check Transitions") registers the incoming word and
// the number of transitions between its neighbouring bits. Stage 2 sets the
// decision bit when that count is above THRESHOLD, inverts every second bit
// of the buffered word when the decision bit is set (b2inv) and registers
// the word together with its decision bit. The decision bit travels with the
// word so the decoder can undo the inversion.
//
// Interface: in/in_valid in, out/dec/sel/out_valid out. sel is the range of
// the transition count (its top two bits). No backpressure: one word per
// clock, latency 2 clocks from in_valid to out_valid. Synchronous,
// active-high reset clears the valid bits.
//
// From the source design: the buffer that holds the word while transitions
// are checked, the threshold decision, the inversion and the added decision
// bit; the 8-bit word and the sel[1:0] output. This design's own choices:
// the threshold value (default (W-1)/2, so an inverted word has at most
// THRESHOLD transitions), which bits are inverted, the meaning of sel and
// the two-stage timing.
module tic_encoder #(
  parameter int unsigned W         = 8,
  parameter int unsigned THRESHOLD = (W - 1) / 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] in,
  output logic         out_valid,
  output logic [W-1:0] out,
  output logic         dec,
  output logic [1:0]   sel
);
  localparam int unsigned CW = $clog2(W);

  // stage 1: buffer and transition count
  logic [CW-1:0] count_d, count_q;
  logic [W-1:0]  buf_q;
  logic          buf_valid;

  transition_counter #(.W(W)) u_check (.word(in), .count(count_d));

  always_ff @(posedge clk) begin
    if (rst) begin
      buf_valid <= 1'b0;
      buf_q     <= '0;
      count_q   <= '0;
    end else begin
      buf_valid <= in_valid;
      if (in_valid) begin
        buf_q   <= in;
        count_q <= count_d;
      end
    end
  end

  // stage 2: decision bit, inversion, add decision bit
  logic         decide;
  logic [W-1:0] inv_word;

  assign decide = (32'(count_q) > THRESHOLD);

  b2inv #(.W(W)) u_inv (.word(buf_q), .inv(decide), .out(inv_word));

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out       <= '0;
      dec       <= 1'b0;
      sel       <= '0;
    end else begin
      out_valid <= buf_valid;
      if (buf_valid) begin
        out <= inv_word;
        dec <= decide;
        sel <= count_q[CW-1 -: 2];
      end
    end
  end
endmodule
