// Test of viterbi_dec: random data encoded by a model of the K=7, rate 1/2 code
// (tap lists 171: delays 0,1,2,3,6; 133: delays 0,2,3,5,6), sent through a
// channel that flips code bits, with random gaps between pairs.
//
// Three stretches: no errors; one flipped bit every 12 to 30 pairs; both bits of
// a pair flipped every 40 to 60 pairs. The code corrects all of these, so every
// decoded bit must equal the data bit in order. Also checks the number of
// decoded bits (one per pair after the first DEPTH) and that out_valid only
// follows an input pair.
module tb_viterbi_dec;
  localparam int DEPTH = 32;   // the decoder's default survivor depth
  localparam int N     = 6000;

  logic       clk = 0, rst_n = 0;
  logic       in_valid = 0;
  logic [1:0] in_code = '0;
  logic       out_valid, out_bit;

  viterbi_dec dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_out = 0, n_err = 0;
  bit data[$];

  function automatic bit past(int n, int d);
    return (n - d >= 0) ? data[n - d] : 1'b0;
  endfunction

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  logic in_valid_q;
  always @(posedge clk) in_valid_q <= in_valid;

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (n_out >= data.size() || out_bit !== data[n_out]) begin
      failures++;
      if (failures < 10) $display("bit %0d: %0b expected %0b", n_out, out_bit, n_out < data.size() ? data[n_out] : 1'b0);
    end
    checks++;
    if (!in_valid_q) begin failures++; $display("out_valid without input"); end
    n_out++;
  end

  initial begin
    bit c0, c1;
    int next_err;
    for (int n = 0; n < N; n++) data.push_back(1'($urandom));
    repeat (3) @(posedge clk);
    rst_n = 1;
    next_err = N / 3 + 12;
    for (int n = 0; n < N; n++) begin
      logic [1:0] e;
      c0 = past(n, 0) ^ past(n, 1) ^ past(n, 2) ^ past(n, 3) ^ past(n, 6);
      c1 = past(n, 0) ^ past(n, 2) ^ past(n, 3) ^ past(n, 5) ^ past(n, 6);
      e = 2'b00;
      if (n == next_err) begin
        if (n < 2 * N / 3) begin
          e = $urandom_range(0, 1) ? 2'b01 : 2'b10;
          next_err = n + $urandom_range(12, 30);
        end else begin
          e = 2'b11;
          next_err = n + $urandom_range(40, 60);
        end
        n_err++;
      end
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_code = {c1, c0} ^ e;
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (n_out != N - DEPTH) begin failures++; $display("%0d bits decoded, expected %0d", n_out, N - DEPTH); end
    $display("%0d channel errors corrected", n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
