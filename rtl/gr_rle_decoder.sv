// gr_rle_decoder: decoder for the Golomb-Rice run-length code of
// gr_rle_encoder (m = 2^K).
//
// It reads a code word bit by bit: '1's count the quotient q until a '0',
// then K remainder bits follow, MSB first, giving r = q * 2^K + rem. It then
// sends r zeros and a closing '1', one bit per clock. It counts the bits of
// each frame: when FRAME_BITS bits have been sent, the rest of the code word
// (the '1' the encoder added to close an open run) is dropped and a new
// frame starts. out_last marks each frame's last bit.
//
// Timing: one code bit is taken per clock while reading (in_ready = 1);
// while sending, in_ready is 0 and one data bit leaves per clock. The output
// has no backpressure. Synchronous, active-high reset.
//
// The code itself follows the source design's run-length step with
// m = 2^k, k = 2; the decoder, its frame rule and its timing are this
// design's own, as the source design gives no decoder for this step.
module gr_rle_decoder #(
  parameter int unsigned K          = 2,
  parameter int unsigned RUN_W      = 8,
  parameter int unsigned FRAME_BITS = 18
) (
  input  logic clk,
  input  logic rst,
  input  logic in_bit,
  input  logic in_valid,
  output logic in_ready,
  output logic out_bit,
  output logic out_valid,
  output logic out_last
);
  typedef enum logic [1:0] {QUOT, REM, EMIT} state_t;

  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned FW = $clog2(FRAME_BITS + 1);

  state_t           state;
  logic [RUN_W-1:0] q;        // quotient read so far
  logic [K-1:0]     rem;      // remainder read so far
  logic [KW-1:0]    ridx;     // remainder bits read
  logic [RUN_W-1:0] zeros;    // zeros still to send
  logic [FW-1:0]    fcnt;     // bits of this frame already sent
  logic [K-1:0]     rem_next; // remainder with the incoming bit shifted in

  assign rem_next  = K'({rem, in_bit});

  assign in_ready  = (state != EMIT);
  assign out_valid = (state == EMIT);
  assign out_bit   = (zeros == '0);
  assign out_last  = (fcnt == FW'(FRAME_BITS - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= QUOT;
      q     <= '0;
      rem   <= '0;
      ridx  <= '0;
      zeros <= '0;
      fcnt  <= '0;
    end else begin
      unique case (state)
        QUOT: if (in_valid) begin
          if (in_bit) q <= q + RUN_W'(1);
          else begin
            state <= REM;
            ridx  <= '0;
          end
        end
        REM: if (in_valid) begin
          ridx <= ridx + KW'(1);
          if (ridx == KW'(K - 1)) begin
            zeros <= (q << K) | RUN_W'(rem_next);
            state <= EMIT;
          end else begin
            rem <= rem_next;
          end
        end
        EMIT: begin
          if (out_last) begin
            // frame complete: drop whatever is left of this code word
            fcnt  <= '0;
            q     <= '0;
            state <= QUOT;
          end else begin
            fcnt <= fcnt + FW'(1);
            if (zeros == '0) begin
              q     <= '0;
              state <= QUOT;
            end else begin
              zeros <= zeros - RUN_W'(1);
            end
          end
        end
        default: state <= QUOT;
      endcase
    end
  end
endmodule
