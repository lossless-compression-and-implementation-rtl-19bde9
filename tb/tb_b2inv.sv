// tb_b2inv: exhaustive check of b2inv for W = 8. For every word and both
// values of inv it compares the output with a bit loop, checks that an
// inverted word has 7 - t transitions, and that applying it twice is the
// identity.
module tb_b2inv;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] word, out, back;
  logic       inv;

  b2inv dut  (.word(word), .inv(inv), .out(out));
  b2inv dut2 (.word(out),  .inv(inv), .out(back));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      for (int w = 0; w < 256; w++) begin
        word = 8'(w);
        inv  = v[0];
        #1;
        checks++;
        if (out !== (inv ? 8'(ref_inv_odd(32'(w), 8)) : word)) begin
          failures++;
          $display("FAIL word=%b inv=%0d out=%b", word, inv, out);
        end
        checks++;
        if (inv && ref_transitions(32'(out), 8) != 7 - ref_transitions(32'(w), 8)) begin
          failures++;
          $display("FAIL transitions not complemented: %b -> %b", word, out);
        end
        checks++;
        if (back !== word) begin
          failures++;
          $display("FAIL not self-inverse: %b -> %b -> %b", word, out, back);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
