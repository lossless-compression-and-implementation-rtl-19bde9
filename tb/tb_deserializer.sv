// tb_deserializer: random bits, with random gaps, into deserializer. Every
// 18 valid bits the word (first bit = MSB) must appear with a one-clock
// word_valid pulse, one clock after the 18th bit.
module tb_deserializer;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic bit_in = 0, bit_valid = 0;
  logic [17:0] word_out;
  logic word_valid;
  logic [17:0] acc;
  int n = 0, words = 0;
  logic expect_v = 0;
  logic [17:0] expect_w;

  deserializer dut (.clk(clk), .rst(rst), .bit_in(bit_in), .bit_valid(bit_valid),
                              .word_out(word_out), .word_valid(word_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 10000; c++) begin
      @(negedge clk);
      checks++;
      if (word_valid !== expect_v || (expect_v && word_out !== expect_w)) begin
        failures++;
        $display("FAIL cycle %0d valid=%0d word=%h expected %0d %h", c, word_valid, word_out, expect_v, expect_w);
      end
      if (word_valid) words++;
      expect_v  = 0;
      bit_valid = ($urandom_range(0, 2) != 0);
      bit_in    = 1'($urandom);
      if (bit_valid) begin
        acc = {acc[16:0], bit_in};
        n++;
        if (n == 18) begin
          n = 0;
          expect_v = 1;
          expect_w = acc;
        end
      end
    end
    checks++;
    if (words < 300) begin failures++; $display("FAIL only %0d words", words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
