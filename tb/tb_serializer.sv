// tb_serializer: random 18-bit words through serializer with a receiver
// that stalls at random. The bits must leave MSB first, bit_last must mark
// each word's 18th bit, and a word is accepted only when the serializer is
// empty.
module tb_serializer;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic load_valid = 0, bit_ready = 0;
  logic [17:0] load_data = '0;
  logic load_ready, bit_out, bit_valid, bit_last;
  logic [17:0] words[$];
  logic [17:0] cur;
  int nbit = 0, nwords = 0, stalls = 0;

  serializer dut (.clk(clk), .rst(rst), .load_valid(load_valid), .load_data(load_data),
    .load_ready(load_ready), .bit_out(bit_out), .bit_valid(bit_valid), .bit_last(bit_last),
    .bit_ready(bit_ready));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver: compare each bit taken
  always @(posedge clk) if (!rst) begin
    if (load_valid && load_ready) words.push_back(load_data);
    if (bit_valid && !bit_ready) stalls++;
    if (bit_valid && bit_ready) begin
      if (nbit == 0) cur = words.pop_front();
      checks++;
      if (bit_out !== cur[17 - nbit] || bit_last !== (nbit == 17)) begin
        failures++;
        $display("FAIL word %0d bit %0d: got %0d last=%0d", nwords, nbit, bit_out, bit_last);
      end
      if (nbit == 17) begin nbit = 0; nwords++; end
      else nbit++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 15000; c++) begin
      @(negedge clk);
      checks++;
      if (load_ready !== !bit_valid) begin
        failures++;
        $display("FAIL load_ready=%0d while bit_valid=%0d", load_ready, bit_valid);
      end
      load_valid = ($urandom_range(0, 1) != 0);
      load_data  = 18'($urandom);
      bit_ready  = ($urandom_range(0, 4) != 0);
    end
    load_valid = 0;
    bit_ready  = 1;
    repeat (40) @(negedge clk);
    checks++;
    if (nwords < 300 || stalls == 0 || words.size() != 0) begin
      failures++;
      $display("FAIL words=%0d stalls=%0d left=%0d", nwords, stalls, words.size());
    end
    $display("words %0d, stalls %0d", nwords, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
