// Self-checking test of acq_formatter with its acquisition EPROM and the frame
// SRAM. A whole QCIF picture is offered pixel by pixel (with random gaps in
// pix_valid); Y, Cr and Cb of each pixel are distinct functions of its position.
// Afterwards the SRAM is read in macroblock order and every sample is compared
// with the value of the pixel that belongs there. The acquisition time is
// checked against 2 cycles per pixel plus 2 more for each pixel carrying
// chrominance, plus the gaps the testbench inserted.
module tb_acq_formatter;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic pix_valid = 0, pix_ready;
  logic [7:0] y_in = 0, cr_in = 0, cb_in = 0;
  logic rom_en; logic [15:0] rom_addr, rom_data;
  logic f_en, f_we; logic [15:0] f_addr; logic [7:0] f_wdata;
  logic t_en = 0; logic [15:0] t_addr = 0;
  logic [7:0] rdata;
  int checks = 0, failures = 0;

  acq_formatter dut (.clk, .rst_n, .start, .busy, .done, .pix_valid, .pix_ready,
    .y_in, .cr_in, .cb_in, .rom_en, .rom_addr, .rom_data,
    .sram_en(f_en), .sram_we(f_we), .sram_addr(f_addr), .sram_wdata(f_wdata));
  acq_eprom rom (.clk, .en(rom_en), .addr(rom_addr), .data(rom_data));
  frame_sram sram (.clk, .en(busy ? f_en : t_en), .we(busy ? f_we : 1'b0),
    .addr(busy ? f_addr : t_addr), .wdata(f_wdata), .rdata);
  always #5 clk = ~clk;

  function automatic logic [7:0] yv(int x, int y);  return 8'(x * 3 + y * 7); endfunction
  function automatic logic [7:0] crv(int x, int y); return 8'(x * 5 + y * 11 + 1); endfunction
  function automatic logic [7:0] cbv(int x, int y); return 8'(x * 13 + y * 2 + 9); endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0, t1, gaps;
  initial t0 = 0;
  always @(posedge clk) t0++;

  initial begin
    int s, gap_start;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    gap_start = t0;
    gaps = 0;
    for (int py = 0; py < 144; py++)
      for (int px = 0; px < 176; px++) begin
        if ($urandom_range(0, 9) == 0) begin @(negedge clk); gaps++; end
        pix_valid = 1; y_in = yv(px, py); cr_in = crv(px, py); cb_in = cbv(px, py);
        do @(posedge clk); while (!pix_ready);
        #1; pix_valid = 0;
      end
    do @(posedge clk); while (!done);
    t1 = t0;
    @(negedge clk);
    checks++;
    // from start: each pixel 2 cycles, 4 with chrominance, plus gaps (gaps are
    // inserted while the block waits, so they add at most one cycle each)
    if (t1 - gap_start > 2 * 25344 + 2 * 6336 + gaps + 4 || t1 - gap_start < 2 * 25344 + 2 * 6336) begin
      failures++; $display("acquisition took %0d cycles (gaps %0d)", t1 - gap_start, gaps);
    end
    // read back in macroblock order
    s = 0;
    for (int mb = 0; mb < 99; mb++)
      for (int b = 0; b < 6; b++)
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) begin
            logic [7:0] exp;
            int px, py;
            if (b < 4) begin
              px = (mb % 11) * 16 + (b % 2) * 8 + c; py = (mb / 11) * 16 + (b / 2) * 8 + r;
              exp = yv(px, py);
            end else begin
              px = ((mb % 11) * 8 + c) * 2; py = ((mb / 11) * 8 + r) * 2;
              exp = (b == 4) ? cbv(px, py) : crv(px, py);
            end
            @(negedge clk); t_en = 1; t_addr = 16'(s);
            @(posedge clk); #1;
            checks++;
            if (rdata !== exp) begin
              failures++;
              if (failures < 10) $display("sram[%0d] = %0h expected %0h", s, rdata, exp);
            end
            s++;
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
