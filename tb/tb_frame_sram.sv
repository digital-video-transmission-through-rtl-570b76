// Self-checking test of frame_sram: writes a pseudo-random pattern to scattered
// addresses across the 64K space, reads it back and compares with a copy kept
// in the testbench; also checks the one-cycle read latency.
module tb_frame_sram;
  logic clk = 0, en = 0, we = 0;
  logic [15:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [7:0] model [int];
  int unsigned a_list [256];

  frame_sram dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      a_list[n] = (n * 40503 + 17) & 16'hffff;
      @(negedge clk);
      en = 1; we = 1; addr = 16'(a_list[n]); wdata = 8'($urandom);
      model[a_list[n]] = wdata;
    end
    for (int n = 0; n < 256; n++) begin
      @(negedge clk);
      en = 1; we = 0; addr = 16'(a_list[n]);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[a_list[n]]) begin
        failures++;
        $display("mismatch at %0h: %0h expected %0h", addr, rdata, model[a_list[n]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
