// serializer: parallel-to-serial converter for the link.
//
// A W-bit word is loaded when the serializer is empty (load_valid &&
// load_ready) and then shifted out MSB first, one bit per accepted transfer
// (bit_valid && bit_ready). bit_last marks the word's final bit. A new word
// can be loaded in the cycle after the last bit has been taken.
// Synchronous, active-high reset empties it.
//
// The source design shows only a serializer fed by a bank of flip-flops;
// bit order, width and handshake are this design's choices.
module serializer #(
  parameter int unsigned W = 18
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load_valid,
  input  logic [W-1:0] load_data,
  output logic         load_ready,
  output logic         bit_out,
  output logic         bit_valid,
  output logic         bit_last,
  input  logic         bit_ready
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  shreg;
  logic [CW-1:0] left;      // bits still to send

  assign load_ready = (left == '0);
  assign bit_valid  = (left != '0);
  assign bit_out    = shreg[W-1];
  assign bit_last   = (left == CW'(1));

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg <= '0;
      left  <= '0;
    end else if (load_valid && load_ready) begin
      shreg <= load_data;
      left  <= CW'(W);
    end else if (bit_valid && bit_ready) begin
      shreg <= {shreg[W-2:0], 1'b0};
      left  <= left - CW'(1);
    end
  end

  // a word is only loaded into an empty serializer
  assert property (@(posedge clk) disable iff (rst) (load_valid && load_ready) |-> !bit_valid);
endmodule
