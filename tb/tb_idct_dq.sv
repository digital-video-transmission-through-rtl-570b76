// Self-checking test of idct_dq. Blocks of levels of the three kinds (all zero,
// DC only, general) are sent with their qualification and a quantizer shift.
// General blocks are compared with the inverse DCT worked out in floating point
// from the definition on the dequantized coefficients (tolerance 2); DC-only
// blocks must give F(0,0)/8 rounded to nearest in all 64 places, zero blocks
// zeros. The latency is checked: results follow the 64th input at once for the
// two short kinds and after the 1024-cycle transform for general blocks.
module tb_idct_dq;
  import pltv_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, out_last, busy;
  logic [2:0] qshift = 0;
  logic signed [15:0] in_level = 0, out_data;
  qual_e in_qual = QUAL_ZERO;
  int checks = 0, failures = 0;
  int n_kind[3] = '{0, 0, 0};

  idct_dq dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real r); return (r < 0.0) ? -r : r; endfunction
  function automatic real cu(int u); return (u == 0) ? 1.0 / $sqrt(2.0) : 1.0; endfunction

  initial begin
    int lv[64];
    real f[64];
    int t_in, t_out, kind;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 30; blk++) begin
      kind   = blk % 3;
      qshift = 3'(blk % 4);
      for (int i = 0; i < 64; i++) begin
        lv[i] = 0;
        if (kind == 2 && $urandom_range(0, 3) == 0) lv[i] = $urandom_range(0, 60) - 30;
      end
      if (kind >= 1) lv[0] = $urandom_range(1, 120) * (($urandom_range(0, 1) == 1) ? 1 : -1);
      if (kind == 2) lv[9] = 5;
      for (int x = 0; x < 8; x++)
        for (int y = 0; y < 8; y++) begin
          real s;
          s = 0.0;
          for (int u = 0; u < 8; u++)
            for (int v = 0; v < 8; v++)
              s += cu(u) * cu(v) * lv[u * 8 + v] * (1 << qshift)
                   * $cos(3.14159265358979 * (2 * x + 1) * u / 16.0)
                   * $cos(3.14159265358979 * (2 * y + 1) * v / 16.0);
          f[x * 8 + y] = s / 4.0;
        end
      for (int i = 0; i < 64; i++) begin
        @(negedge clk); in_valid = 1; in_level = 16'(lv[i]);
        in_qual = (i == 63) ? qual_e'(kind) : QUAL_ZERO;
      end
      @(posedge clk); t_in = $time;
      @(negedge clk); in_valid = 0;
      for (int i = 0; i < 64; i++) begin
        do @(posedge clk); while (!out_valid);
        if (i == 0) t_out = $time;
        checks++;
        if (kind == 0 && out_data !== 16'sd0) begin failures++; $display("zero block gave %0d", out_data); end
        if (kind == 1 && int'(out_data) != ((lv[0] * (1 << qshift) + 4) >>> 3)) begin
          failures++; $display("DC block gave %0d for F00 %0d", out_data, lv[0] * (1 << qshift));
        end
        if (rabs(real'(out_data) - f[i]) > 2.0) begin
          failures++;
          if (failures < 10) $display("blk %0d sample %0d: %0d exact %f", blk, i, out_data, f[i]);
        end
        if ((i == 63) != out_last) begin failures++; $display("out_last wrong at %0d", i); end
      end
      checks++;
      if (kind != 2 && (t_out - t_in) / 10 != 1 || kind == 2 && (t_out - t_in) / 10 != 1025) begin
        failures++; $display("kind %0d: first result %0d cycles after last input", kind, (t_out - t_in) / 10);
      end
      n_kind[kind]++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
