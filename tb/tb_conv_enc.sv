// Test of conv_enc: random data bits offered with random valid and take strobes.
//
// The expected code pairs are computed from the bit history with the tap lists
// of the two generators written out by delay (171: delays 0,1,2,3,6; 133: delays
// 0,2,3,5,6), independent of the mask form used in the RTL. Checks every pair
// while valid, that out_valid follows in_valid, and that the encoder only
// advances on a taken bit.
module tb_conv_enc;
  logic       clk = 0, rst_n = 0;
  logic       in_valid = 0, in_bit = 0, in_take = 0;
  logic       out_valid;
  logic [1:0] code;

  conv_enc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit hist[$];   // taken bits, newest last

  function automatic bit past(int d, bit u);
    if (d == 0) return u;
    return (hist.size() >= d) ? hist[hist.size() - d] : 1'b0;
  endfunction

  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    bit c0, c1, u;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_bit   = 1'($urandom);
      in_take  = ($urandom_range(0, 2) != 0);
      #1;
      u  = in_bit;
      c0 = past(0, u) ^ past(1, u) ^ past(2, u) ^ past(3, u) ^ past(6, u);
      c1 = past(0, u) ^ past(2, u) ^ past(3, u) ^ past(5, u) ^ past(6, u);
      checks++;
      if (out_valid !== in_valid) begin
        failures++;
        $display("step %0d: out_valid %0b", n, out_valid);
      end
      if (in_valid) begin
        checks++;
        if (code !== {c1, c0}) begin
          failures++;
          if (failures < 10) $display("step %0d: code %b expected %b", n, code, {c1, c0});
        end
      end
      @(posedge clk);
      if (in_valid && in_take) hist.push_back(u);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
