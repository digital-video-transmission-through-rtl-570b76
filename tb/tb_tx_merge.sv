// Self-checking test of tx_merge. Two FIFO models are filled by two DSP models
// with random words (at random times, sometimes running empty); each DSP raises
// sub_done after its last word and drops it on sub_ack. The serial output,
// taken on random bit_en strobes, must equal DSP 0's words followed by DSP 1's,
// MSB first, for three pictures in a row, with one sub_ack per DSP per picture.
module tb_tx_merge;
  logic clk = 0, rst_n = 0;
  logic [1:0] fifo_empty, fifo_rd, sub_done = 0, sub_ack;
  logic [1:0][15:0] fifo_rdata;
  logic bit_en = 0, tx_bit, tx_valid, src;
  logic [15:0] fq [2][$];
  bit exp_bits[$];
  int checks = 0, failures = 0, n_ack[2] = '{0, 0}, n_bits = 0;

  tx_merge dut (.*);
  always #5 clk = ~clk;

  always_comb begin
    for (int d = 0; d < 2; d++) begin
      fifo_empty[d] = (fq[d].size() == 0);
      fifo_rdata[d] = fifo_empty[d] ? 16'h0 : fq[d][0];
    end
  end

  always @(posedge clk) begin
    for (int d = 0; d < 2; d++) begin
      if (fifo_rd[d] && fq[d].size() > 0) void'(fq[d].pop_front());
      if (rst_n && sub_ack[d]) begin n_ack[d]++; sub_done[d] <= 1'b0; end
    end
    if (bit_en && tx_valid) begin
      checks++;
      n_bits++;
      if (exp_bits.size() == 0 || tx_bit != exp_bits[0]) begin
        failures++;
        if (failures < 10) $display("bit %0d wrong", n_bits);
      end
      if (exp_bits.size() > 0) void'(exp_bits.pop_front());
    end
    bit_en <= ($urandom_range(0, 2) == 0);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nw[2];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 3; p++) begin
      nw[0] = $urandom_range(5, 40);
      nw[1] = $urandom_range(5, 40);
      // the expected stream is fixed before the words exist: generate them first
      begin
        logic [15:0] w0[$], w1[$];
        for (int w = 0; w < nw[0]; w++) w0.push_back(16'($urandom));
        for (int w = 0; w < nw[1]; w++) w1.push_back(16'($urandom));
        foreach (w0[i]) for (int b = 15; b >= 0; b--) exp_bits.push_back(w0[i][b]);
        foreach (w1[i]) for (int b = 15; b >= 0; b--) exp_bits.push_back(w1[i][b]);
        fork
          begin
            foreach (w0[i]) begin repeat ($urandom_range(0, 40)) @(negedge clk); fq[0].push_back(w0[i]); end
            @(negedge clk); sub_done[0] = 1'b1;
            while (sub_done[0]) @(negedge clk);
          end
          begin
            foreach (w1[i]) begin repeat ($urandom_range(0, 40)) @(negedge clk); fq[1].push_back(w1[i]); end
            @(negedge clk); sub_done[1] = 1'b1;
            while (sub_done[1]) @(negedge clk);
          end
        join
      end
    end
    while (exp_bits.size() > 0) @(negedge clk);
    repeat (50) @(negedge clk);
    checks++;
    if (n_ack[0] != 3 || n_ack[1] != 3) begin failures++; $display("acks %0d %0d", n_ack[0], n_ack[1]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
