// Self-checking test of disp_scan with the three display EPROMs and the three
// dual-port RAMs. The RAMs are loaded the way the demultiplexer fills them
// (macroblock order) with values that are functions of the pixel position; after
// frame_ready the outputs, taken on random pix_en strobes, must show the picture
// in raster order for two complete refreshes: Y of the pixel and Cr/Cb of its
// 2x2 group, with out_first on pixel 0 and out_line on column 0.
module tb_disp_scan;
  logic clk = 0, rst_n = 0, frame_ready = 0, pix_en = 0;
  logic rom_en, ram_en, out_valid, out_first, out_line, running;
  logic [14:0] pix_cnt, rom_y, rom_cr, rom_cb, ram_addr_y;
  logic [12:0] ram_addr_cr, ram_addr_cb;
  logic [7:0] ram_y, ram_cr, ram_cb, y_out, cr_out, cb_out;
  logic wy = 0, wc = 0;
  logic [14:0] wa_y = 0;
  logic [12:0] wa_c = 0;
  logic [7:0] wd_y = 0, wd_cr = 0, wd_cb = 0;
  int checks = 0, failures = 0;

  disp_scan dut (.*);
  disp_eprom #(.CHROMA(1'b0)) ry (.clk, .en(rom_en), .addr(pix_cnt), .data(rom_y));
  disp_eprom #(.CHROMA(1'b1)) rcr (.clk, .en(rom_en), .addr(pix_cnt), .data(rom_cr));
  disp_eprom #(.CHROMA(1'b1)) rcb (.clk, .en(rom_en), .addr(pix_cnt), .data(rom_cb));
  dp_ram #(.AW(15)) my (.clk_a(clk), .we_a(wy), .addr_a(wa_y), .wdata_a(wd_y),
    .clk_b(clk), .en_b(ram_en), .addr_b(ram_addr_y), .rdata_b(ram_y));
  dp_ram #(.AW(13)) mcr (.clk_a(clk), .we_a(wc), .addr_a(wa_c), .wdata_a(wd_cr),
    .clk_b(clk), .en_b(ram_en), .addr_b(ram_addr_cr), .rdata_b(ram_cr));
  dp_ram #(.AW(13)) mcb (.clk_a(clk), .we_a(wc), .addr_a(wa_c), .wdata_a(wd_cb),
    .clk_b(clk), .en_b(ram_en), .addr_b(ram_addr_cb), .rdata_b(ram_cb));
  always #5 clk = ~clk;

  function automatic logic [7:0] yv(int x, int y);  return 8'(x + y * 3); endfunction
  function automatic logic [7:0] crv(int x, int y); return 8'(x * 7 + y + 100); endfunction
  function automatic logic [7:0] cbv(int x, int y); return 8'(x + y * 5 + 7); endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_pix = 0, n_first = 0;
  always @(posedge clk) if (rst_n && pix_en && out_valid) begin
    int px, py, k;
    k  = n_pix % 25344;
    px = k % 176; py = k / 176;
    checks++;
    if (y_out !== yv(px, py) || cr_out !== crv(px / 2, py / 2) || cb_out !== cbv(px / 2, py / 2) ||
        out_first != (k == 0) || out_line != (px == 0)) begin
      failures++;
      if (failures < 10) $display("pixel %0d: %h %h %h f%b l%b", k, y_out, cr_out, cb_out, out_first, out_line);
    end
    if (out_first && n_pix < 2 * 25344) n_first++;
    n_pix++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load the RAMs in macroblock order
    for (int mb = 0; mb < 99; mb++)
      for (int p = 0; p < 256; p++) begin
        int px, py;
        px = (mb % 11) * 16 + ((p / 64) % 2) * 8 + p % 8;
        py = (mb / 11) * 16 + (p / 128) * 8 + (p % 64) / 8;
        @(negedge clk); wy = 1; wa_y = 15'(mb * 256 + p); wd_y = yv(px, py);
      end
    @(negedge clk); wy = 0;
    for (int mb = 0; mb < 99; mb++)
      for (int p = 0; p < 64; p++) begin
        int cx, cy;
        cx = (mb % 11) * 8 + p % 8;
        cy = (mb / 11) * 8 + p / 8;
        @(negedge clk); wc = 1; wa_c = 13'(mb * 64 + p); wd_cr = crv(cx, cy); wd_cb = cbv(cx, cy);
      end
    @(negedge clk); wc = 0;
    @(negedge clk); frame_ready = 1;
    @(negedge clk); frame_ready = 0;
    while (n_pix < 2 * 25344) begin
      @(negedge clk); pix_en = ($urandom_range(0, 3) != 0);
    end
    @(negedge clk); pix_en = 0;
    checks++;
    if (n_first != 2 || !running) begin failures++; $display("%0d picture starts", n_first); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
