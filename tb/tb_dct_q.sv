// Self-checking test of dct_q. Blocks of random differences, smooth blocks,
// flat blocks (only a DC term) and all-zero blocks are transformed with several
// quantizer shifts. Each level is compared with the DCT worked out in floating
// point from the definition (the level times the step must be within one step
// plus 2 of the exact coefficient and, truncation being towards zero, no larger
// in magnitude than it by more than 2). The block
// qualification is checked against the levels and, for the flat and zero
// blocks, against the kind of block sent. The time from first input to last
// output must be 64 + 1024 + 64 cycles.
module tb_dct_q;
  import pltv_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, out_last, busy;
  logic [2:0] qshift = 0;
  logic signed [15:0] in_data = 0, out_level;
  qual_e qual;
  int checks = 0, failures = 0;
  int n_kind[3] = '{0, 0, 0};

  dct_q dut (.*);
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
    int a[64];
    real F[64];
    int lv[64];
    int t_first, t_last, cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 24; blk++) begin
      int kind;   // 0 random, 1 smooth, 2 flat, 3 zero
      kind = blk % 4;
      qshift = 3'(blk % 5);
      for (int i = 0; i < 64; i++) begin
        case (kind)
          0: a[i] = $urandom_range(0, 510) - 255;
          1: a[i] = (i / 8) * 9 - (i % 8) * 5 + 20;
          2: a[i] = 16 * (blk % 3 + 1) * ((blk & 1) ? -1 : 1);
          default: a[i] = 0;
        endcase
      end
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          real s;
          s = 0.0;
          for (int x = 0; x < 8; x++)
            for (int y = 0; y < 8; y++)
              s += a[x * 8 + y] * $cos(3.14159265358979 * (2 * x + 1) * u / 16.0)
                                * $cos(3.14159265358979 * (2 * y + 1) * v / 16.0);
          F[u * 8 + v] = s * cu(u) * cu(v) / 4.0;
        end
      t_first = -1;
      cyc = 0;
      for (int i = 0; i < 64; i++) begin
        @(negedge clk); in_valid = 1; in_data = 16'(a[i]);
        if (t_first < 0) t_first = cyc;
      end
      @(negedge clk); in_valid = 0;
      for (int i = 0; i < 64; i++) begin
        do @(posedge clk); while (!out_valid);
        lv[i] = out_level;
        if (out_last) t_last = $time;
        checks++;
        if (rabs(real'(lv[i]) * (1 << qshift) - F[i]) > (1 << qshift) + 2.0 ||
            rabs(real'(lv[i]) * (1 << qshift)) > rabs(F[i]) + 2.0 ||
            (lv[i] > 0 && F[i] < 0) || (lv[i] < 0 && F[i] > 0)) begin
          failures++;
          if (failures < 10) $display("blk %0d coef %0d: level %0d, exact %f, shift %0d", blk, i, lv[i], F[i], qshift);
        end
        if (i == 63) begin
          qual_e eq;
          bit ac, dc;
          dc = lv[0] != 0; ac = 0;
          for (int k = 1; k < 64; k++) if (lv[k] != 0) ac = 1;
          eq = ac ? QUAL_FULL : (dc ? QUAL_DC : QUAL_ZERO);
          checks++;
          if (!out_last || qual != eq) begin failures++; $display("blk %0d: qual %s expected %s", blk, qual.name(), eq.name()); end
          if (kind == 3 && qual != QUAL_ZERO) begin failures++; $display("zero block not qualified zero"); end
          if (kind == 2 && qual != QUAL_DC) begin failures++; $display("flat block not qualified DC-only"); end
          n_kind[qual]++;
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_kind[0] == 0 || n_kind[1] == 0 || n_kind[2] == 0) begin
      failures++; $display("qualifications seen: %0d %0d %0d", n_kind[0], n_kind[1], n_kind[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency: first input accepted to out_last
  int t_in0;
  always @(posedge clk) begin
    if (in_valid && !busy) t_in0 = $time;
    if (out_valid && out_last) begin
      checks++;
      if (($time - t_in0) / 10 != 64 + 1024 + 64 - 1) begin
        failures++; $display("block took %0d cycles", ($time - t_in0) / 10);
      end
    end
  end
endmodule
