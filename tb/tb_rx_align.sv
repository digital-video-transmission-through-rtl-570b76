// Self-checking test of rx_align. The received stream is: unsynchronised noise,
// then three pictures, each a picture start code followed by a payload whose
// length is not a multiple of 16 bits, then one more start code. Noise and
// payload never contain 16 zeros in a row, so only the real start codes can
// match. Expected FIFO words are worked out by concatenating each picture's
// start code and payload and completing it with zeros to a whole word. Bits
// arrive on random rx_valid strobes; the number of frame_sync pulses is checked.
module tb_rx_align;
  logic clk = 0, rst_n = 0, rx_valid = 0, rx_bit = 0;
  logic wr_en, frame_sync, locked, dropped;
  logic [15:0] wdata;
  logic fifo_full = 0;
  bit stream[$];
  logic [15:0] exp_words[$];
  int checks = 0, failures = 0, n_sync = 0;
  localparam logic [21:0] PSC = 22'b0000_0000_0000_0000_1000_00;

  rx_align dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (frame_sync) n_sync++;
    if (wr_en) begin
      checks++;
      if (exp_words.size() == 0 || wdata !== exp_words[0]) begin
        failures++;
        $display("word %h, expected %h", wdata, exp_words.size() ? exp_words[0] : 16'hxxxx);
      end
      if (exp_words.size() > 0) void'(exp_words.pop_front());
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random bits with a one forced at least every 8 bits
  task automatic noise(input int n, ref bit q[$]);
    for (int i = 0; i < n; i++) q.push_back((i % 8 == 7) ? 1'b1 : 1'($urandom));
  endtask

  initial begin
    int len[3] = '{50, 42, 123};
    noise(37, stream);
    for (int p = 0; p < 3; p++) begin
      bit pic[$];
      pic.delete();
      for (int b = 21; b >= 0; b--) pic.push_back(PSC[b]);
      noise(len[p], pic);
      foreach (pic[i]) stream.push_back(pic[i]);
      while (pic.size() % 16 != 0) pic.push_back(1'b0);   // zero completion
      for (int w = 0; w < pic.size() / 16; w++) begin
        logic [15:0] v;
        for (int b = 0; b < 16; b++) v[15 - b] = pic[w * 16 + b];
        exp_words.push_back(v);
      end
    end
    for (int b = 21; b >= 0; b--) stream.push_back(PSC[b]);

    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (stream[i]) begin
      @(negedge clk);
      rx_valid = 0;
      while ($urandom_range(0, 2) == 0) @(negedge clk);
      rx_valid = 1; rx_bit = stream[i];
    end
    @(negedge clk); rx_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_words.size() != 0) begin failures++; $display("%0d words missing", exp_words.size()); end
    checks++;
    if (n_sync != 4 || !locked) begin failures++; $display("%0d start codes found", n_sync); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
