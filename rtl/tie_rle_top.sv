// tie_rle_top: TIE-RLE compressor link for ECG samples.
//
// Transmit side. A 16-bit ECG sample is registered (ecg_sample_reg) and its
// two bytes go to two transition inversion encoders (e1: bits 15:8, e2: bits
// 7:0). Each encoder inverts every second bit of a byte whose neighbour-bit
// transitions exceed the threshold and adds a decision bit, so the frame
//   {dec1, byte1', dec2, byte2'}   (2 x 9 = 18 bits)
// has few level changes. An XOR network (xor_diff) turns the frame into
// transition form, where a '1' marks a change: mostly zeros. The frame is
// serialised MSB first and the zero runs are Golomb-Rice coded (m = 4) onto
// comp_bit.
//
// Receive side. rx_bit is Golomb-Rice decoded back into 18-bit frames
// (deserializer), the XOR network is undone (xor_undiff) and the two
// transition inversion decoders restore the bytes; sample_out_valid pulses
// once per decoded sample. The two sides share only clk and rst; a link, or
// a loopback from comp_* to rx_*, joins them.
//
// Interface and timing. sample_ready is high when the transmit side can take
// a sample; a sample is taken when sample_valid && sample_ready. One sample
// is in the parallel part at a time: the next is taken once the previous
// frame has been loaded into the serializer and the serializer is empty
// again. encoded_out, encode_range1/2 and decision_out (the encoders'
// outputs) are new when encoded_valid pulses, 3 clocks after the sample was
// taken. comp_bit leaves under a valid/ready handshake; rx_bit enters under
// one. Synchronous active-high reset.
//
// From the source design: the 16-bit sample register, the two 8-bit
// encoders with their out/sel outputs, the transition inversion with a
// decision bit, an XOR network and a Golomb-Rice run-length step with m = 4.
// This design's own choices: how these steps are chained, the frame layout,
// the XOR network's wiring, the meaning of sel, the handshakes and the
// receive side's run-length decoder.
module tie_rle_top #(
  parameter int unsigned SAMPLE_W  = tie_rle_pkg::SAMPLE_W,
  parameter int unsigned GR_K      = tie_rle_pkg::GR_K,
  parameter int unsigned THRESHOLD = (SAMPLE_W / 2 - 1) / 2
) (
  input  logic                clk,
  input  logic                rst,
  // transmit side
  input  logic [SAMPLE_W-1:0] ecg_sample1,
  input  logic                sample_valid,
  output logic                sample_ready,
  output logic [SAMPLE_W-1:0] encoded_out,
  output logic [1:0]          encode_range1,
  output logic [1:0]          encode_range2,
  output logic [1:0]          decision_out,
  output logic                encoded_valid,
  output logic                comp_bit,
  output logic                comp_valid,
  input  logic                comp_ready,
  // receive side
  input  logic                rx_bit,
  input  logic                rx_valid,
  output logic                rx_ready,
  output logic [SAMPLE_W-1:0] sample_out,
  output logic                sample_out_valid
);
  localparam int unsigned W     = SAMPLE_W / 2;
  localparam int unsigned FW    = 2 * (W + 1);
  localparam int unsigned RUNW  = $clog2(FW + 2);

  // ---------------- transmit side ----------------
  logic [SAMPLE_W-1:0] ecg_sample_reg;
  logic                sreg_valid, inflight;
  logic                ser_ready;

  assign sample_ready = ser_ready && !inflight;

  always_ff @(posedge clk) begin
    if (rst) begin
      ecg_sample_reg <= '0;
      sreg_valid     <= 1'b0;
      inflight       <= 1'b0;
    end else begin
      sreg_valid <= sample_valid && sample_ready;
      if (sample_valid && sample_ready) begin
        ecg_sample_reg <= ecg_sample1;
        inflight       <= 1'b1;
      end else if (encoded_valid) begin
        inflight <= 1'b0;
      end
    end
  end

  logic [W-1:0] e1_out, e2_out;
  logic         e1_dec, e2_dec, e1_valid, e2_valid;

  tic_encoder #(.W(W), .THRESHOLD(THRESHOLD)) e1 (
    .clk(clk), .rst(rst), .in_valid(sreg_valid), .in(ecg_sample_reg[SAMPLE_W-1 -: W]),
    .out_valid(e1_valid), .out(e1_out), .dec(e1_dec), .sel(encode_range1));

  tic_encoder #(.W(W), .THRESHOLD(THRESHOLD)) e2 (
    .clk(clk), .rst(rst), .in_valid(sreg_valid), .in(ecg_sample_reg[W-1:0]),
    .out_valid(e2_valid), .out(e2_out), .dec(e2_dec), .sel(encode_range2));

  assign encoded_out   = {e1_out, e2_out};
  assign decision_out  = {e1_dec, e2_dec};
  assign encoded_valid = e1_valid;

  logic [FW-1:0] tx_frame, tx_diff;
  assign tx_frame = {e1_dec, e1_out, e2_dec, e2_out};

  xor_diff #(.W(FW)) u_diff (.word(tx_frame), .diff(tx_diff));

  logic ser_bit, ser_valid, ser_last, enc_ready;

  serializer #(.W(FW)) u_ser (
    .clk(clk), .rst(rst), .load_valid(encoded_valid), .load_data(tx_diff), .load_ready(ser_ready),
    .bit_out(ser_bit), .bit_valid(ser_valid), .bit_last(ser_last), .bit_ready(enc_ready));

  gr_rle_encoder #(.K(GR_K), .RUN_W(RUNW)) u_rle_enc (
    .clk(clk), .rst(rst), .in_bit(ser_bit), .in_last(ser_last), .in_valid(ser_valid),
    .in_ready(enc_ready), .out_bit(comp_bit), .out_valid(comp_valid), .out_ready(comp_ready));

  // ---------------- receive side ----------------
  logic          dec_bit, dec_valid, dec_last;
  logic [FW-1:0] rx_diff, rx_frame;
  logic          rx_frame_valid;

  gr_rle_decoder #(.K(GR_K), .RUN_W(RUNW), .FRAME_BITS(FW)) u_rle_dec (
    .clk(clk), .rst(rst), .in_bit(rx_bit), .in_valid(rx_valid), .in_ready(rx_ready),
    .out_bit(dec_bit), .out_valid(dec_valid), .out_last(dec_last));

  deserializer #(.W(FW)) u_deser (
    .clk(clk), .rst(rst), .bit_in(dec_bit), .bit_valid(dec_valid),
    .word_out(rx_diff), .word_valid(rx_frame_valid));

  xor_undiff #(.W(FW)) u_undiff (.diff(rx_diff), .word(rx_frame));

  logic [W-1:0] d1_out, d2_out;
  logic         d1_valid, d2_valid;

  tic_decoder #(.W(W)) d1 (
    .clk(clk), .rst(rst), .in_valid(rx_frame_valid), .in(rx_frame[FW-2 -: W]), .dec(rx_frame[FW-1]),
    .out_valid(d1_valid), .out(d1_out));

  tic_decoder #(.W(W)) d2 (
    .clk(clk), .rst(rst), .in_valid(rx_frame_valid), .in(rx_frame[W-1:0]), .dec(rx_frame[W]),
    .out_valid(d2_valid), .out(d2_out));

  assign sample_out       = {d1_out, d2_out};
  assign sample_out_valid = d1_valid;

  // both halves of a sample move in lockstep; frames end where the decoder
  // says they end
  assert property (@(posedge clk) disable iff (rst) e1_valid == e2_valid);
  assert property (@(posedge clk) disable iff (rst) d1_valid == d2_valid);
  assert property (@(posedge clk) disable iff (rst) rx_frame_valid |-> $past(dec_last));
endmodule
