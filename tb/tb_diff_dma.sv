// Self-checking test of diff_dma (FPGA2 processing) with the frame SRAM and two
// DSP memories. The SRAM holds a random picture; DSP 0's prediction area
// (2C00H..) holds random signed values, DSP 1's holds zeros (an INTRA picture).
// A simple DSP model answers hold_req with hold_ack after a few cycles. After the
// transfer each DSP's difference area (8000H..) must hold new sample minus
// prediction for its own sub-image, the prediction must be intact, and the
// transfer must take 2 cycles per sample plus the HOLD handshakes.
module tb_diff_dma;
  import pltv_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic s_en; logic [15:0] s_addr; logic [7:0] s_rdata;
  logic t_sen = 0, t_swe = 0; logic [15:0] t_saddr = 0; logic [7:0] t_swdata = 0;
  logic [1:0] hold_req, hold_ack = 0;
  logic [1:0] m_en; logic m_we; logic [15:0] m_addr, m_wdata;
  logic [1:0][15:0] m_rdata;
  logic [1:0] d_en = 0, d_we = 0; logic [15:0] d_addr = 0, d_wdata = 0;
  int checks = 0, failures = 0;
  int n_hold = 0;

  diff_dma dut (.clk, .rst_n, .start, .busy, .done, .sram_en(s_en), .sram_addr(s_addr),
    .sram_rdata(s_rdata), .hold_req, .hold_ack, .mem_en(m_en), .mem_we(m_we),
    .mem_addr(m_addr), .mem_wdata(m_wdata), .mem_rdata(m_rdata));
  frame_sram sram (.clk, .en(busy ? s_en : t_sen), .we(busy ? 1'b0 : t_swe),
    .addr(busy ? s_addr : t_saddr), .wdata(t_swdata), .rdata(s_rdata));
  for (genvar d = 0; d < 2; d++) begin : g
    dsp_mem mem (.clk, .hold(hold_ack[d]), .dsp_en(d_en[d]), .dsp_we(d_we[d]),
      .dsp_addr(d_addr), .dsp_wdata(d_wdata), .dma_en(m_en[d]), .dma_we(m_we),
      .dma_addr(m_addr), .dma_wdata(m_wdata), .rdata(m_rdata[d]));
  end
  always #5 clk = ~clk;

  // DSP model: acknowledge HOLD three cycles after the request, release two after
  for (genvar d = 0; d < 2; d++) begin : g_dsp
    initial forever begin
      do @(posedge clk); while (!(rst_n && hold_req[d]));
      repeat (2) @(posedge clk);
      hold_ack[d] <= 1'b1;
      n_hold++;
      do @(posedge clk); while (hold_req[d]);
      @(posedge clk);
      hold_ack[d] <= 1'b0;
    end
  end

  logic [7:0]  pic  [FRAME_SAMPLES];
  logic [15:0] pred [FRAME_SAMPLES];

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog at %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic dsp_write(input int d, input logic [15:0] a, input logic [15:0] v);
    @(negedge clk); d_en = 0; d_en[d] = 1; d_we = 0; d_we[d] = 1; d_addr = a; d_wdata = v;
  endtask

  task automatic dsp_read(input int d, input logic [15:0] a, output logic [15:0] v);
    @(negedge clk); d_en = 0; d_en[d] = 1; d_we = 0; d_addr = a;
    @(posedge clk); #1; v = m_rdata[d];
    d_en = 0;
  endtask

  initial begin
    int t_start, t_end, base, n;
    logic [15:0] v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < FRAME_SAMPLES; i++) begin
      pic[i]  = 8'($urandom);
      pred[i] = (i < SUB0_SAMPLES) ? 16'($signed($urandom_range(0, 600)) - 300) : 16'd0;
      @(negedge clk); t_sen = 1; t_swe = 1; t_saddr = 16'(i); t_swdata = pic[i];
    end
    @(negedge clk); t_sen = 0; t_swe = 0;
    for (int i = 0; i < FRAME_SAMPLES; i++) begin
      if (i < SUB0_SAMPLES) dsp_write(0, PRED_BASE + 16'(i), pred[i]);
      else                  dsp_write(1, PRED_BASE + 16'(i - SUB0_SAMPLES), pred[i]);
    end
    @(negedge clk); d_en = 0; d_we = 0;
    @(negedge clk); start = 1; t_start = $time;
    @(negedge clk); start = 0;
    do @(posedge clk); while (!done);
    t_end = $time;
    checks++;
    n = (t_end - t_start) / 10;
    if (n < 2 * FRAME_SAMPLES || n > 2 * FRAME_SAMPLES + 20) begin
      failures++; $display("transfer took %0d cycles", n);
    end
    checks++;
    if (n_hold != 2) begin failures++; $display("HOLD granted %0d times", n_hold); end
    for (int d = 0; d < 2; d++) begin
      base = d ? SUB0_SAMPLES : 0;
      n    = d ? SUB1_SAMPLES : SUB0_SAMPLES;
      for (int i = 0; i < n; i++) begin
        dsp_read(d, DIF_BASE + 16'(i), v);
        checks++;
        if (v !== 16'({8'd0, pic[base + i]} - pred[base + i])) begin
          failures++;
          if (failures < 10) $display("DSP%0d dif[%0d] = %0h", d, i, v);
        end
        if (i % 97 == 0) begin
          dsp_read(d, PRED_BASE + 16'(i), v);
          checks++;
          if (v !== pred[base + i]) begin failures++; $display("DSP%0d pred[%0d] changed", d, i); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
