// Self-checking test of dp_ram: port A (fast clock) fills the RAM, port B (slow,
// unrelated clock) reads it back while port A keeps writing another region;
// each read is compared with the value written, one port-B clock after the address.
module tb_dp_ram;
  localparam int AW = 10;
  logic clk_a = 0, clk_b = 0, we_a = 0, en_b = 0;
  logic [AW-1:0] addr_a = '0, addr_b = '0;
  logic [7:0] wdata_a = '0, rdata_b;
  int checks = 0, failures = 0;

  dp_ram #(.AW(AW)) dut (.*);
  always #5 clk_a = ~clk_a;
  always #7 clk_b = ~clk_b;

  function automatic logic [7:0] pat(input int a, input int pass);
    return 8'((a * 37 + pass * 101 + 5) ^ (a >> 3));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk_a); we_a = 1; addr_a = AW'(a); wdata_a = pat(a, 0);
    end
    @(negedge clk_a); we_a = 0;
    fork
      begin  // port A rewrites the upper half
        for (int a = 2**AW/2; a < 2**AW; a++) begin
          @(negedge clk_a); we_a = 1; addr_a = AW'(a); wdata_a = pat(a, 1);
        end
        @(negedge clk_a); we_a = 0;
      end
      begin  // port B reads the lower half meanwhile
        for (int a = 0; a < 2**AW/2; a++) begin
          @(negedge clk_b); en_b = 1; addr_b = AW'(a);
          @(posedge clk_b); #1;
          checks++;
          if (rdata_b !== pat(a, 0)) begin failures++; $display("A %0d: %0h", a, rdata_b); end
        end
      end
    join
    for (int a = 2**AW/2; a < 2**AW; a++) begin
      @(negedge clk_b); en_b = 1; addr_b = AW'(a);
      @(posedge clk_b); #1;
      checks++;
      if (rdata_b !== pat(a, 1)) begin failures++; $display("B %0d: %0h", a, rdata_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
