// tb_transition_counter: exhaustive check of transition_counter for W = 8.
// Every 8-bit word is applied and the count is compared with a bit loop.
module tb_transition_counter;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] word;
  logic [2:0] count;

  transition_counter dut (.word(word), .count(count));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 256; w++) begin
      word = 8'(w);
      #1;
      checks++;
      if (int'(count) != ref_transitions(32'(w), 8)) begin
        failures++;
        $display("FAIL word=%b count=%0d expected %0d", word, count, ref_transitions(32'(w), 8));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
