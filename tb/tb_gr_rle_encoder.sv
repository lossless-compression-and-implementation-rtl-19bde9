// tb_gr_rle_encoder: random 18-bit frames, from sparse to dense, through
// gr_rle_encoder (K = 2) with random input gaps and output stalls. The code
// bits must equal the reference Rice coding of each frame's zero runs, with
// an open run at the frame end closed by a virtual '1'. Also checks that the
// coder never takes input while it sends a code word, and that code words
// with a quotient, frames ending in '0' and frames ending in '1' all occur.
// It starts with a directed stream made of the subsets 001, 00001, 01,
// 0000001, 0001 (run lengths 2, 4, 1, 6, 3), whose code words are written
// out by hand: 0 10, 10 00, 0 01, 10 10, 0 11.
module tb_gr_rle_encoder;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic in_bit = 0, in_last = 0, in_valid = 0, out_ready = 0;
  logic in_ready, out_bit, out_valid;
  bitq_t data, expect_q, fr, code;
  int nin = 0, nout = 0, end0 = 0, end1 = 0, longrun = 0, run;

  gr_rle_encoder #(.K(2), .RUN_W(5)) dut (.clk(clk), .rst(rst), .in_bit(in_bit), .in_last(in_last),
    .in_valid(in_valid), .in_ready(in_ready), .out_bit(out_bit), .out_valid(out_valid),
    .out_ready(out_ready));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed stream: runs 2, 4, 1, 6, 3 sent as one frame
    bit dir_data[] = '{0,0,1, 0,0,0,0,1, 0,1, 0,0,0,0,0,0,1, 0,0,0,1};
    bit dir_code[] = '{0,1,0, 1,0,0,0, 0,0,1, 1,0,1,0, 0,1,1};
    int dir_len = 21;
    foreach (dir_data[i]) data.push_back(dir_data[i]);
    foreach (dir_code[i]) expect_q.push_back(dir_code[i]);
    // build the stimulus and the expected code stream
    for (int f = 0; f < 600; f++) begin
      int dens = $urandom_range(1, 8);
      fr.delete();
      for (int i = 0; i < 18; i++) fr.push_back(bit'($urandom_range(0, 15) < dens));
      if (f == 0) foreach (fr[i]) fr[i] = 0;          // an all-zero frame
      if (fr[17]) end1++; else end0++;
      run = 0;
      foreach (fr[i]) begin
        run = fr[i] ? 0 : run + 1;
        if (run >= 4) longrun++;
      end
      foreach (fr[i]) data.push_back(fr[i]);
      code = ref_rle_frame(fr, 2);
      foreach (code[i]) expect_q.push_back(code[i]);
    end
    checks++;
    if (end0 == 0 || end1 == 0 || longrun == 0) begin
      failures++;
      $display("FAIL stimulus lacks a case: end0=%0d end1=%0d longrun=%0d", end0, end1, longrun);
    end

    repeat (3) @(negedge clk);
    rst = 0;
    while (nout < expect_q.size()) begin
      @(negedge clk);
      in_valid  = (nin < data.size()) && ($urandom_range(0, 3) != 0);
      in_bit    = (nin < data.size()) ? data[nin] : 1'b0;
      in_last   = (nin < dir_len) ? (nin == dir_len - 1) : ((nin - dir_len) % 18) == 17;
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (in_ready && out_valid) begin
        failures++;
        $display("FAIL takes input while sending");
      end
      if (in_valid && in_ready) nin++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_bit !== expect_q[nout]) begin
          failures++;
          if (failures < 10) $display("FAIL code bit %0d = %0d, expected %0d", nout, out_bit, expect_q[nout]);
        end
        nout++;
      end
    end
    repeat (10) @(negedge clk);
    checks++;
    if (out_valid || nin != data.size()) begin
      failures++;
      $display("FAIL stream does not end cleanly: out_valid=%0d nin=%0d", out_valid, nin);
    end
    $display("data bits %0d, code bits %0d", data.size(), expect_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
