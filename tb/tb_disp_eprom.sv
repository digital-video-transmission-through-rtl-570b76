// Self-checking test of disp_eprom, both variants: for every raster pixel of the
// 176x144 picture, the luminance table must point at the RAM position that the
// macroblock write order (256 Y samples per macroblock, four 8x8 blocks) gives
// that pixel, and the chrominance table at the position (64 per macroblock) of
// the 2x2-subsampled sample covering it.
module tb_disp_eprom;
  logic clk = 0, en = 0;
  logic [14:0] addr = '0, data_y, data_c;
  int checks = 0, failures = 0;

  disp_eprom #(.CHROMA(1'b0)) dut_y (.clk, .en, .addr, .data(data_y));
  disp_eprom #(.CHROMA(1'b1)) dut_c (.clk, .en, .addr, .data(data_c));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ey, ec, blk;
    for (int py = 0; py < 144; py++)
      for (int px = 0; px < 176; px++) begin
        blk = ((py / 8) % 2) * 2 + (px / 8) % 2;
        ey  = ((py / 16) * 11 + px / 16) * 256 + blk * 64 + (py % 8) * 8 + (px % 8);
        ec  = ((py / 16) * 11 + px / 16) * 64 + ((py / 2) % 8) * 8 + (px / 2) % 8;
        @(negedge clk); en = 1; addr = 15'(py * 176 + px);
        @(posedge clk); #1;
        checks += 2;
        if (data_y != 15'(ey)) begin failures++; if (failures < 10) $display("Y (%0d,%0d): %0d vs %0d", px, py, data_y, ey); end
        if (data_c != 15'(ec)) begin failures++; if (failures < 10) $display("C (%0d,%0d): %0d vs %0d", px, py, data_c, ec); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
