// Self-checking test of video_fifo at its default depth: random writes and
// reads against a queue model, filling it until full (checking that full is
// raised at exactly DEPTH words and that a further write is dropped and flagged)
// and draining it until empty.
module tb_video_fifo;
  localparam int DEPTH = 1024;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, full, empty, overflow;
  logic [15:0] wdata = 0, rdata;
  logic [$clog2(DEPTH):0] count;
  logic [15:0] q[$];
  int checks = 0, failures = 0;

  video_fifo dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit w, input bit r);
    @(negedge clk);
    wr_en = w; rd_en = r; wdata = 16'($urandom);
    checks++;
    if (empty != (q.size() == 0) || full != (q.size() == DEPTH) || count != q.size()) begin
      failures++; $display("flags: empty %b full %b count %0d model %0d", empty, full, count, q.size());
    end
    if (r && q.size() > 0) begin
      checks++;
      if (rdata !== q[0]) begin failures++; $display("read %h expected %h", rdata, q[0]); end
    end
    @(posedge clk);
    if (r && q.size() > 0) void'(q.pop_front());
    if (w && q.size() < DEPTH) q.push_back(wdata);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) step($urandom_range(0, 1), $urandom_range(0, 1));
    while (q.size() < DEPTH) step(1, $urandom_range(0, 3) == 0);
    checks++;
    if (overflow) begin failures++; $display("overflow before a write to a full FIFO"); end
    step(1, 0);
    @(negedge clk);
    checks++;
    if (!overflow) begin failures++; $display("overflow not flagged"); end
    while (q.size() > 0) step($urandom_range(0, 3) == 0, 1);
    step(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
