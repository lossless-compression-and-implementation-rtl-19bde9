// tb_xor_diff: random 18-bit words through xor_diff; each output bit is
// compared with the XOR of the two neighbouring input bits (MSB kept).
module tb_xor_diff;
  int checks = 0, failures = 0;
  logic [17:0] word, diff, expect_d;

  xor_diff dut (.word(word), .diff(diff));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      word = (n < 18) ? (18'(1) << n) : 18'($urandom);
      #1;
      expect_d = word ^ (word >> 1);
      checks++;
      if (diff !== expect_d) begin
        failures++;
        $display("FAIL word=%b diff=%b expected %b", word, diff, expect_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
