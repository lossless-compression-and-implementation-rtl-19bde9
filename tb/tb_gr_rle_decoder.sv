// tb_gr_rle_decoder: random 18-bit frames are Rice-coded by the reference
// model (K = 2) and fed, with random gaps, to gr_rle_decoder. The decoded
// bits must equal the frames, out_last must mark every 18th bit, and the
// virtual '1' closing a frame that ends in '0' must be dropped.
module tb_gr_rle_decoder;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic in_bit = 0, in_valid = 0;
  logic in_ready, out_bit, out_valid, out_last;
  bitq_t data, code, fr, cw;
  int nin = 0, nout = 0, end0 = 0, end1 = 0;

  gr_rle_decoder #(.K(2), .RUN_W(5), .FRAME_BITS(18)) dut (.clk(clk), .rst(rst),
    .in_bit(in_bit), .in_valid(in_valid), .in_ready(in_ready),
    .out_bit(out_bit), .out_valid(out_valid), .out_last(out_last));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 600; f++) begin
      int dens = $urandom_range(1, 8);
      fr.delete();
      for (int i = 0; i < 18; i++) fr.push_back(bit'($urandom_range(0, 15) < dens));
      if (f == 1) foreach (fr[i]) fr[i] = 0;
      if (f == 2) foreach (fr[i]) fr[i] = 1;
      if (fr[17]) end1++; else end0++;
      foreach (fr[i]) data.push_back(fr[i]);
      cw = ref_rle_frame(fr, 2);
      foreach (cw[i]) code.push_back(cw[i]);
    end
    repeat (3) @(negedge clk);
    rst = 0;
    while (nout < data.size()) begin
      @(negedge clk);
      in_valid = (nin < code.size()) && ($urandom_range(0, 3) != 0);
      in_bit   = (nin < code.size()) ? code[nin] : 1'b0;
      #1;
      if (in_valid && in_ready) nin++;
      if (out_valid) begin
        checks++;
        if (out_bit !== data[nout] || out_last !== ((nout % 18) == 17)) begin
          failures++;
          if (failures < 10)
            $display("FAIL bit %0d = %0d last=%0d, expected %0d", nout, out_bit, out_last, data[nout]);
        end
        nout++;
      end
    end
    repeat (30) @(negedge clk);
    checks++;
    if (out_valid || nin != code.size() || end0 == 0 || end1 == 0) begin
      failures++;
      $display("FAIL end: out_valid=%0d nin=%0d of %0d end0=%0d end1=%0d", out_valid, nin, code.size(), end0, end1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
