// tb_tic_decoder: random words and decision bits into tic_decoder. Two
// clocks later the output must be the word with its odd bits inverted back
// exactly when the decision bit was set. Checks the 2-clock latency too.
module tb_tic_decoder;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic in_valid = 0, dec = 0;
  logic [7:0] in = '0;
  logic out_valid;
  logic [7:0] out;
  logic [7:0] hist_w[0:4095];
  logic       hist_v[0:4095], hist_d[0:4095];

  tic_decoder dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in(in), .dec(dec),
                            .out_valid(out_valid), .out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
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
          checks++;
          if (out !== (hist_d[c-2] ? 8'(ref_inv_odd(32'(hist_w[c-2]), 8)) : hist_w[c-2])) begin
            failures++;
            $display("FAIL in=%b dec=%0d out=%b", hist_w[c-2], hist_d[c-2], out);
          end
        end
      end
      in_valid  = ($urandom_range(0, 3) != 0);
      in        = 8'($urandom);
      dec       = 1'($urandom);
      hist_v[c] = in_valid;
      hist_w[c] = in;
      hist_d[c] = dec;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
