// tb_xor_undiff: random 18-bit transition-form words through xor_undiff.
// The result is compared with a Gray-code style decode (XOR of all higher
// bits), and re-encoding it must give the input back.
module tb_xor_undiff;
  int checks = 0, failures = 0;
  logic [17:0] diff, word, expect_w;

  xor_undiff dut (.diff(diff), .word(word));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      diff = (n < 18) ? (18'(1) << n) : 18'($urandom);
      #1;
      for (int i = 0; i < 18; i++) expect_w[i] = ^(diff >> i);
      checks++;
      if (word !== expect_w) begin
        failures++;
        $display("FAIL diff=%b word=%b expected %b", diff, word, expect_w);
      end
      checks++;
      if ((word ^ (word >> 1)) !== diff) begin
        failures++;
        $display("FAIL not the inverse of the neighbour XOR: %b", diff);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
