// gr_rle_encoder: run-length coder with Golomb-Rice code words (m = 2^K).
//
// The input is a serial bit stream split into frames (in_last marks a
// frame's last bit). The coder counts the zeros in front of each '1'; the
// '1' closes the run and the run length r is sent as a Golomb-Rice code:
// q = r >> K sent as q '1's and a closing '0', then the K low bits of r,
// MSB first. With K = 2: r = 0 -> 0 00, r = 2 -> 0 10, r = 6 -> 10 10.
// A run still open at the frame's last bit is sent as if a '1' followed
// (r = run + 1 when that last bit is 0); the decoder knows the frame length
// and drops that '1'. So every frame ends on a code word boundary.
//
// Timing: while counting, one input bit is taken per clock (in_ready = 1).
// When a run closes, in_ready drops and the code word is sent one bit per
// accepted transfer (out_valid && out_ready), after which counting resumes.
// A code word is q + 1 + K bits long. Synchronous, active-high reset.
//
// From the source design: coding runs of zeros closed by a '1' and the
// Golomb-Rice parameter m = 2^k with k = 2. This design's choices: the code
// word layout (standard Rice code), the frame-end rule and the handshake.
module gr_rle_encoder #(
  parameter int unsigned K     = 2,
  parameter int unsigned RUN_W = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic in_bit,
  input  logic in_last,
  input  logic in_valid,
  output logic in_ready,
  output logic out_bit,
  output logic out_valid,
  input  logic out_ready
);
  typedef enum logic [1:0] {COUNT, QUOT, SEP, REM} state_t;

  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;

  state_t            state;
  logic [RUN_W-1:0]  run;      // zeros seen in the open run
  logic [RUN_W-1:0]  qleft;    // quotient '1's still to send
  logic [K-1:0]      rem;      // remainder bits, MSB sent first
  logic [KW-1:0]     ridx;     // remainder bits already sent
  logic [RUN_W-1:0]  code_r;   // run length to send when a run closes
  logic              closes;   // this input bit closes the run

  assign in_ready  = (state == COUNT);
  assign out_valid = (state != COUNT);

  always_comb begin
    closes = in_bit || in_last;
    code_r = in_bit ? run : run + RUN_W'(1);
    unique case (state)
      QUOT:    out_bit = 1'b1;
      SEP:     out_bit = 1'b0;
      REM:     out_bit = rem[K-1];
      default: out_bit = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= COUNT;
      run   <= '0;
      qleft <= '0;
      rem   <= '0;
      ridx  <= '0;
    end else begin
      unique case (state)
        COUNT: if (in_valid) begin
          if (closes) begin
            qleft <= code_r >> K;
            rem   <= code_r[K-1:0];
            ridx  <= '0;
            run   <= '0;
            state <= ((code_r >> K) != '0) ? QUOT : SEP;
          end else begin
            run <= run + RUN_W'(1);
          end
        end
        QUOT: if (out_ready) begin
          qleft <= qleft - RUN_W'(1);
          if (qleft == RUN_W'(1)) state <= SEP;
        end
        SEP: if (out_ready) state <= REM;
        REM: if (out_ready) begin
          rem  <= rem << 1;
          ridx <= ridx + KW'(1);
          if (ridx == KW'(K - 1)) state <= COUNT;
        end
        default: state <= COUNT;
      endcase
    end
  end

  // the run counter must never wrap
  assert property (@(posedge clk) disable iff (rst)
                   (state == COUNT && in_valid && !closes) |-> (run != '1));
endmodule
