// Self-checking test of acq_eprom: walks the frame buffer in macroblock order
// (macroblock, block, row, column), works out which acquisition index lands
// there, and checks that the EPROM returns this buffer position for that index.
// Every one of the 38016 entries is checked.
module tb_acq_eprom;
  logic clk = 0, en = 0;
  logic [15:0] addr = '0, data;
  int checks = 0, failures = 0;

  acq_eprom dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int buf_pos, idx, px, py;
    buf_pos = 0;
    for (int mr = 0; mr < 9; mr++)
      for (int mc = 0; mc < 11; mc++)
        for (int b = 0; b < 6; b++)
          for (int r = 0; r < 8; r++)
            for (int c = 0; c < 8; c++) begin
              if (b < 4) begin
                py  = mr * 16 + (b / 2) * 8 + r;
                px  = mc * 16 + (b % 2) * 8 + c;
                idx = py * 176 + px;
              end else begin
                py  = mr * 8 + r;
                px  = mc * 8 + c;
                idx = 25344 + (b == 5 ? 6336 : 0) + py * 88 + px;
              end
              @(negedge clk); en = 1; addr = 16'(idx);
              @(posedge clk); #1;
              checks++;
              if (data != 16'(buf_pos)) begin
                failures++;
                if (failures < 10) $display("idx %0d -> %0d expected %0d", idx, data, buf_pos);
              end
              buf_pos++;
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
