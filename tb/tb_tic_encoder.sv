// tb_tic_encoder: random 8-bit words, with random gaps, into tic_encoder.
// Two clocks after each valid word the output must hold the word with its
// odd bits inverted exactly when it has more than 3 transitions, the
// decision bit, and sel = top two bits of the transition count. Also checks
// the 2-clock latency (out_valid) and that the reset clears out_valid.
module tb_tic_encoder;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic [7:0] in = '0;
  logic out_valid, dec;
  logic [7:0] out;
  logic [1:0] sel;
  logic [7:0] hist_w[0:4095];
  logic       hist_v[0:4095];
  int inv_seen = 0, plain_seen = 0;

  tic_encoder dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in(in),
                            .out_valid(out_valid), .out(out), .dec(dec), .sel(sel));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    repeat (3) @(negedge clk);
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("FAIL out_valid set in reset"); end
    rst = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      if (c >= 2) begin
        checks++;
        if (out_valid !== hist_v[c-2]) begin
          failures++;
          $display("FAIL cycle %0d out_valid=%0d expected %0d", c, out_valid, hist_v[c-2]);
        end
        if (hist_v[c-2]) begin
          t = ref_transitions(32'(hist_w[c-2]), 8);
          checks++;
          if (dec !== (t > 3) || sel !== 2'(t >> 1) ||
              out !== ((t > 3) ? 8'(ref_inv_odd(32'(hist_w[c-2]), 8)) : hist_w[c-2])) begin
            failures++;
            $display("FAIL in=%b t=%0d out=%b dec=%0d sel=%0d", hist_w[c-2], t, out, dec, sel);
          end
          if (t > 3) inv_seen++; else plain_seen++;
        end
      end
      in_valid  = ($urandom_range(0, 3) != 0);
      in        = 8'($urandom);
      hist_v[c] = in_valid;
      hist_w[c] = in;
    end
    checks++;
    if (inv_seen == 0 || plain_seen == 0) begin
      failures++;
      $display("FAIL inverted and plain words not both seen");
    end
    $display("inverted %0d, plain %0d", inv_seen, plain_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
