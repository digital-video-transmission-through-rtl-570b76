// Self-checking test of ycc_demux. DSP3 writes samples at random times; for
// every write the testbench checks which RAM is enabled and at which address,
// from the sample's place in the macroblock (first 256 samples Y, then 64 Cb,
// then 64 Cr). A picture is first abandoned half-way (frame_start must restart
// the counters), then two whole pictures are written; frame_done must pulse
// exactly once after the last sample of each whole picture.
module tb_ycc_demux;
  logic clk = 0, rst_n = 0, frame_start = 0, dsp_we = 0;
  logic we_y, we_cr, we_cb, frame_done;
  logic [14:0] addr_y;
  logic [12:0] addr_c;
  int checks = 0, failures = 0, n_done = 0;

  ycc_demux dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && frame_done) n_done++;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic picture(input int n);
    for (int s = 0; s < n; s++) begin
      int mb, p;
      logic ey, ecb, ecr;
      int ea;
      mb = s / 384; p = s % 384;
      ey = p < 256; ecb = p >= 256 && p < 320; ecr = p >= 320;
      ea = ey ? mb * 256 + p : (ecb ? mb * 64 + p - 256 : mb * 64 + p - 320);
      @(negedge clk);
      dsp_we = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
      dsp_we = 1;
      #1;
      checks++;
      if (we_y != ey || we_cb != ecb || we_cr != ecr ||
          (ey ? int'(addr_y) : int'(addr_c)) != ea) begin
        failures++;
        if (failures < 10) $display("sample %0d: we %b%b%b addr %0d/%0d expected %b%b%b %0d",
          s, we_y, we_cb, we_cr, addr_y, addr_c, ey, ecb, ecr, ea);
      end
    end
    @(negedge clk); dsp_we = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    picture(5000);
    @(negedge clk); frame_start = 1;
    @(negedge clk); frame_start = 0;
    picture(38016);
    repeat (3) @(negedge clk);
    checks++;
    if (n_done != 1) begin failures++; $display("frame_done %0d times after picture 1", n_done); end
    picture(38016);
    repeat (3) @(negedge clk);
    checks++;
    if (n_done != 2) begin failures++; $display("frame_done %0d times after picture 2", n_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
