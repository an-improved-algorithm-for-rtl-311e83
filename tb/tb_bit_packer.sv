// tb_bit_packer: checks the codeword-to-word packer.
//
// Random events of random-length codewords (0 to 26 bits, the last one
// flagged) are pushed with random gaps while the output is stalled at random.
// The bits of the output words, cut at out_nbits, must equal the bits pushed,
// every word but the last must be full, and out_last must mark the last one.
// With both sides always ready an event must take exactly one cycle per
// codeword plus one per output word.
module tb_bit_packer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, in_ready, in_last;
  logic [25:0] in_code;
  logic [4:0]  in_len;
  logic        out_valid, out_ready, out_last;
  logic [63:0] out_data;
  logic [6:0]  out_nbits;

  bit_packer dut (.*);

  int checks = 0, failures = 0;
  int stalls = 0;
  bit sent[$], recv[$];
  int words;
  bit got_last;
  int gap_pct, bp_pct;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      for (int b = 0; b < int'(out_nbits); b++) recv.push_back(out_data[63 - b]);
      words++;
      if (!out_last && out_nbits != 7'd64) begin
        failures++;
        $display("short word without out_last");
      end
      if (out_last) got_last <= 1'b1;
    end
    out_ready <= ($urandom_range(99) >= bp_pct);
  end

  task automatic push(int len, bit last);
    logic [25:0] c = '0;
    for (int b = 0; b < len; b++) begin
      bit v = bit'($urandom_range(1));
      c[25 - b] = v;
      sent.push_back(v);
    end
    while ($urandom_range(99) < gap_pct) @(negedge clk);
    @(negedge clk);
    in_valid = 1'b1;
    in_code  = c;
    in_len   = 5'(len);
    in_last  = last;
    while (!in_ready) begin
      stalls++;
      @(negedge clk);
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  initial begin
    in_valid = 0; in_code = '0; in_len = '0; in_last = 0;
    gap_pct = 0; bp_pct = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 400; e++) begin
      automatic int n = (e % 10 == 0) ? 0 : $urandom_range(60, 1);
      int t0, t1, ncode, lastlen;
      gap_pct = (e % 2) ? 0 : 30;
      bp_pct  = (e % 2) ? 0 : 40;
      sent.delete(); recv.delete(); words = 0; got_last = 0;
      @(posedge clk);
      t0 = $time / 10;
      for (int i = 0; i < n; i++) push($urandom_range(26), 1'b0);
      lastlen = (e % 4 == 0) ? 0 : $urandom_range(26);
      push(lastlen, 1'b1);
      ncode = n + 1;
      while (!got_last) @(posedge clk);
      t1 = $time / 10;
      checks++;
      if (sent != recv) begin
        failures++;
        if (failures < 5) $display("event %0d: sent %0d bits, received %0d", e, sent.size(), recv.size());
      end
      checks++;
      // a zero-length closing codeword on a word boundary costs an empty word
      if (words != (sent.size() + 63) / 64 + ((lastlen == 0 && sent.size() % 64 == 0) ? 1 : 0)) begin
        failures++;
        $display("event %0d: %0d words for %0d bits", e, words, sent.size());
      end
      if (gap_pct == 0 && bp_pct == 0) begin
        checks++;
        // the first push waits one negedge, the last word is seen one edge late
        if (t1 - t0 != ncode + words + 1) begin
          failures++;
          $display("event %0d: %0d cycles for %0d codes and %0d words", e, t1 - t0, ncode, words);
        end
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("input never stalled"); end
    $display("input stall cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
