// Self-checking test of dsp_mem: the DSP side writes words, then with hold high
// the DMA side reads them and writes others, then the DSP side reads everything
// back. Also checks that the DMA port is ignored without hold and the DSP port
// is ignored with hold.
module tb_dsp_mem;
  logic clk = 0, hold = 0;
  logic dsp_en = 0, dsp_we = 0, dma_en = 0, dma_we = 0;
  logic [15:0] dsp_addr = '0, dsp_wdata = '0, dma_addr = '0, dma_wdata = '0, rdata;
  int checks = 0, failures = 0;

  dsp_mem dut (.*);
  always #5 clk = ~clk;

  function automatic logic [15:0] pat(input int a);
    return 16'(a * 7919 + 3);
  endfunction

  task automatic check(input logic [15:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin failures++; $display("%s: got %h exp %h", what, rdata, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // DSP fills 0x2C00.. with a pattern; a DMA write without hold must be ignored
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      dsp_en = 1; dsp_we = 1; dsp_addr = 16'h2C00 + 16'(a); dsp_wdata = pat(a);
      dma_en = 1; dma_we = 1; dma_addr = 16'h2C00 + 16'(a); dma_wdata = 16'hdead;
    end
    @(negedge clk); dsp_en = 0; dma_en = 0; hold = 1;
    // DMA reads the DSP's data and writes complements at 0x8000..
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); dma_en = 1; dma_we = 0; dma_addr = 16'h2C00 + 16'(a);
      @(posedge clk); #1; check(pat(a), "dma read");
      @(negedge clk); dma_we = 1; dma_addr = 16'h8000 + 16'(a); dma_wdata = ~pat(a);
    end
    @(negedge clk); dma_en = 0; hold = 0;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); dsp_en = 1; dsp_we = 0; dsp_addr = 16'h8000 + 16'(a);
      @(posedge clk); #1; check(~pat(a), "dsp read dif");
      @(negedge clk); dsp_addr = 16'h2C00 + 16'(a);
      @(posedge clk); #1; check(pat(a), "dsp read pred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
