// tb_tie_rle_top_m2: the end-to-end test of tb_tie_rle_top, run with the
// Golomb-Rice parameter m = 2 (GR_K = 1) instead of the default m = 4.
// Everything else is as described below.
//
// tb_tie_rle_top: end-to-end test of tie_rle_top at its default sizes.
//
// 1000 synthetic 16-bit ECG samples (baseline with slow wander and noise,
// and a Q-R-S spike every 250 samples, about 1 LSB = 1/8192 mV) are sent
// through the transmit side. The compressed stream goes through a link
// model (a queue with random stalls on both ends) back into the receive
// side. Checked against a reference model written in the testbench:
//   - encoded_out, encode_range1/2, decision_out of every sample, and that
//     they appear 3 clocks after the sample was taken;
//   - every compressed bit;
//   - every decoded sample, in order.
// Each mechanism must occur at least once: inversion in each encoder, a
// word sent plain, a code word with a non-zero quotient, a frame ending in
// '0' (the virtual closing '1' dropped) and one ending in '1', a stall on
// the compressed output, a gap on the receive input, and a sample held
// back by sample_ready. The compression ratio is printed, next to what the
// same Rice run-length step gives on the raw samples and on the inverted
// frames without the XOR network, for comparison.
module tb_tie_rle_top_m2;
  import tb_ref_pkg::*;
  localparam int N = 1000;
  localparam int K = 1;     // Golomb-Rice parameter of the top (m = 2^K)
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [15:0] ecg_sample1 = '0;
  logic sample_valid = 0, comp_ready = 0, rx_bit = 0, rx_valid = 0;
  logic sample_ready, encoded_valid, comp_bit, comp_valid, rx_ready, sample_out_valid;
  logic [15:0] encoded_out, sample_out;
  logic [1:0] encode_range1, encode_range2, decision_out;

  tie_rle_top #(.GR_K(K)) dut (
    .clk(clk), .rst(rst), .ecg_sample1(ecg_sample1), .sample_valid(sample_valid),
    .sample_ready(sample_ready), .encoded_out(encoded_out), .encode_range1(encode_range1),
    .encode_range2(encode_range2), .decision_out(decision_out), .encoded_valid(encoded_valid),
    .comp_bit(comp_bit), .comp_valid(comp_valid), .comp_ready(comp_ready),
    .rx_bit(rx_bit), .rx_valid(rx_valid), .rx_ready(rx_ready),
    .sample_out(sample_out), .sample_out_valid(sample_out_valid));

  always #5 clk = ~clk;

  logic [15:0] samples[N];
  bitq_t       code, link;
  int          taken_at[N];
  int ntx = 0, nenc = 0, ncode = 0, nrx = 0, cyc = 0;
  // mechanism counters
  int inv_hi = 0, inv_lo = 0, plain = 0, quot = 0, end0 = 0, end1 = 0;
  int comp_stall = 0, rx_gap = 0, held = 0;
  int len_raw = 0, len_noxor = 0;   // comparison code lengths

  function automatic logic [17:0] ref_frame(input logic [15:0] s);
    logic [7:0] hi = s[15:8], lo = s[7:0];
    logic d1 = ref_transitions(32'(hi), 8) > 3;
    logic d2 = ref_transitions(32'(lo), 8) > 3;
    logic [7:0] w1 = d1 ? 8'(ref_inv_odd(32'(hi), 8)) : hi;
    logic [7:0] w2 = d2 ? 8'(ref_inv_odd(32'(lo), 8)) : lo;
    return {d1, w1, d2, w2};
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d sent, %0d received", ntx, nrx);
    $display("same run-length code on the raw samples: %0d bits; on the inverted frames without the XOR network: %0d bits",
             len_raw, len_noxor);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, ph, run;
    logic [17:0] fr, df;
    bitq_t bits, cw;
    // synthetic ECG
    for (int i = 0; i < N; i++) begin
      ph = i % 250;
      v  = 7800 + ((i % 400) < 200 ? (i % 400) : 400 - (i % 400)) + int'($urandom_range(0, 400));
      if (ph >= 100 && ph < 104) v -= 600 * (ph - 99);          // Q dip
      if (ph >= 104 && ph < 112) v += 1600 * (ph - 103);        // R up-stroke
      if (ph >= 112 && ph < 120) v += 1600 * (120 - ph) - 800;  // R down-stroke, S
      samples[i] = 16'(v);
    end
    samples[0] = 16'hFFFF;   // a word with no transitions at all
    samples[1] = 16'h5555;   // a word with all transitions
    // expected code stream
    for (int i = 0; i < N; i++) begin
      fr = ref_frame(samples[i]);
      df = fr ^ (fr >> 1);
      bits.delete();
      for (int b = 17; b >= 0; b--) bits.push_back(df[b]);
      if (df[0]) end1++; else end0++;
      run = 0;
      foreach (bits[b]) begin
        if (bits[b] || b == 17) begin
          if (!bits[b]) run++;
          if (run >= (1 << K)) quot++;
          run = 0;
        end else run++;
      end
      cw = ref_rle_frame(bits, K);
      foreach (cw[b]) code.push_back(cw[b]);
      // comparison: run-length step alone, and without the XOR network
      bits.delete();
      for (int b = 15; b >= 0; b--) bits.push_back(samples[i][b]);
      len_raw += ref_rle_frame(bits, K).size();
      bits.delete();
      for (int b = 17; b >= 0; b--) bits.push_back(fr[b]);
      len_noxor += ref_rle_frame(bits, K).size();
    end

    repeat (3) @(negedge clk);
    rst = 0;
    while (nrx < N) begin
      @(negedge clk);
      cyc++;
      // outputs registered at the last edge
      if (encoded_valid) begin
        fr = ref_frame(samples[nenc]);
        checks++;
        if (encoded_out !== {fr[16:9], fr[7:0]} || decision_out !== {fr[17], fr[8]} ||
            encode_range1 !== 2'(ref_transitions(32'(samples[nenc][15:8]), 8) >> 1) ||
            encode_range2 !== 2'(ref_transitions(32'(samples[nenc][7:0]), 8) >> 1)) begin
          failures++;
          $display("FAIL encoder outputs of sample %0d", nenc);
        end
        checks++;
        if (cyc - taken_at[nenc] != 3) begin
          failures++;
          $display("FAIL encoder latency %0d", cyc - taken_at[nenc]);
        end
        if (fr[17]) inv_hi++;
        if (fr[8]) inv_lo++;
        if (!fr[17] || !fr[8]) plain++;
        nenc++;
      end
      if (sample_out_valid) begin
        checks++;
        if (sample_out !== samples[nrx]) begin
          failures++;
          $display("FAIL sample %0d: got %h expected %h", nrx, sample_out, samples[nrx]);
        end
        nrx++;
      end
      // new inputs
      sample_valid = (ntx < N) && ($urandom_range(0, 7) != 0);
      ecg_sample1  = (ntx < N) ? samples[ntx] : 16'h0;
      comp_ready   = ($urandom_range(0, 4) != 0);
      rx_valid     = (link.size() > 0) && ($urandom_range(0, 4) != 0);
      rx_bit       = (link.size() > 0) ? link[0] : 1'b0;
      #1;
      if (sample_valid && !sample_ready) held++;
      if (sample_valid && sample_ready) begin
        taken_at[ntx] = cyc;
        ntx++;
      end
      if (comp_valid && !comp_ready) comp_stall++;
      if (rx_ready && !rx_valid) rx_gap++;
      if (comp_valid && comp_ready) begin
        checks++;
        if (comp_bit !== code[ncode]) begin
          failures++;
          if (failures < 10) $display("FAIL compressed bit %0d", ncode);
        end
        ncode++;
        link.push_back(comp_bit);
      end
      if (rx_valid && rx_ready) void'(link.pop_front());
    end
    checks++;
    if (ncode != code.size()) begin
      failures++;
      $display("FAIL %0d compressed bits sent, %0d expected", ncode, code.size());
    end
    $display("mechanisms: inv_hi=%0d inv_lo=%0d plain=%0d quotient=%0d end0=%0d end1=%0d comp_stall=%0d rx_gap=%0d held=%0d",
             inv_hi, inv_lo, plain, quot, end0, end1, comp_stall, rx_gap, held);
    checks++;
    if (inv_hi == 0 || inv_lo == 0 || plain == 0 || quot == 0 || end0 == 0 || end1 == 0 ||
        comp_stall == 0 || rx_gap == 0 || held == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("compression: %0d samples x 16 bits = %0d bits -> %0d bits (%0d.%0d%%), %0d clocks",
             N, N * 16, ncode, ncode * 100 / (N * 16), (ncode * 1000 / (N * 16)) % 10, cyc);
    $display("same run-length code on the raw samples: %0d bits; on the inverted frames without the XOR network: %0d bits",
             len_raw, len_noxor);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
