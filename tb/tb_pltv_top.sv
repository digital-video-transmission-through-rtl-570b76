// End-to-end test of pltv_top at its default sizes (a full QCIF picture).
//
// The testbench plays the parts outside the design: the A/D, the three DSPs
// and the modem with its channel (a loop from tx to rx that flips one code bit
// in every 25 code pairs, which the Viterbi decoder must correct).
//  1. DSP 0 and DSP 1 load their prediction areas (DSP 1 with zeros: INTRA).
//  2. DSP 0 starts an acquisition through the FPGA2 registers; the A/D model
//     delivers a picture; DSP 0 polls STATUS until it is done.
//  3. DSP 1 starts the difference transfer; both DSPs grant HOLD; afterwards
//     each DSP's difference area is checked against picture minus prediction.
//  4. An 8x8 block of DSP 0's differences, a flat block and a zero block go
//     through the DCT/quantizer and dequantizer/IDCT engine; levels and
//     reconstructions are checked against floating-point transforms.
//  5. The DSPs write the bit streams of two pictures into FIFO1/FIFO2 (DSP 0
//     fast enough to fill its FIFO and be stalled), followed by the start code of
//     a third and a few words more; the streams cross the noisy loop and DSP 3
//     reads FIFO3. The
//     words must equal the transmitted bits cut at each start code and padded
//     to whole words; the second picture's start code is not word-aligned.
//  6. DSP 3 writes the acquired picture in macroblock order through FPGA3 and
//     the D/A outputs are checked in raster order for a whole refresh.
// Each mechanism (acquisition, HOLD, INTER and INTRA differences, FIFO full
// stall, source switch, start-code sync, zero completion, the three block
// qualifications, display refresh, corrected channel errors) is counted and must occur.
module tb_pltv_top;
  import pltv_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ad_valid = 0, ad_ready;
  logic [7:0] ad_y = 0, ad_cr = 0, ad_cb = 0;
  logic [1:0] io_sel = 0, io_we = 0;
  logic [1:0][1:0] io_addr = '0;
  logic [1:0][15:0] io_wdata = '0, io_rdata;
  logic [1:0] cm_en = 0, cm_we = 0;
  logic [1:0][15:0] cm_addr = '0, cm_wdata = '0, cm_rdata;
  logic [1:0] hold_req, hold_ack = 0;
  logic [1:0] vb_wr = 0, vb_full, sub_done = 0, sub_ack;
  logic [1:0][15:0] vb_wdata = '0;
  logic tx_bit_en = 0, tx_valid;
  logic [1:0] tx_code, rx_code;
  logic rx_valid, rx_locked, rx_frame_sync;
  logic f3_rd = 0, f3_empty;
  logic [15:0] f3_rdata;
  logic dm_en = 0, dm_we = 0;
  logic [15:0] dm_addr = 0, dm_wdata = 0, dm_rdata;
  logic pic_start = 0, pic_we = 0;
  logic [7:0] pic_data = 0;
  logic pix_en = 0;
  logic [7:0] da_y, da_cr, da_cb;
  logic da_valid, da_first, da_line;
  logic [2:0] xf_qshift = 0;
  logic xf_in_valid = 0;
  logic signed [15:0] xf_in_data = 0, xf_lvl, xf_rec;
  logic xf_lvl_valid, xf_lvl_last, xf_rec_valid, xf_rec_last;
  qual_e xf_qual;
  logic [2:0] vb_overflow;
  logic rx_dropped;

  pltv_top dut (.*);

  always #5 clk = ~clk;

  // modem replaced by a channel that passes each code pair sent on a bit_en
  // strobe and flips one code bit in every 25 pairs
  int n_pair = 0, n_fec = 0;
  assign rx_valid = tx_valid && tx_bit_en;
  assign rx_code  = tx_code ^ ((n_pair % 25 == 7) ? 2'(1 << (n_pair / 25 % 2)) : 2'b00);
  always @(posedge clk) if (rst_n && rx_valid) begin
    if (n_pair % 25 == 7) n_fec++;
    n_pair++;
  end

  int checks = 0, failures = 0;
  int n_hold = 0, n_stall = 0, n_ack = 0, n_sync = 0, n_flush = 0, n_qual[3] = '{0, 0, 0};
  int n_inter = 0, n_intra = 0, n_acq = 0, n_refresh = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------- DSP models: HOLD ----------
  for (genvar d = 0; d < 2; d++) begin : g_hold
    initial forever begin
      do @(posedge clk); while (!(rst_n && hold_req[d]));
      repeat (2) @(posedge clk);
      hold_ack[d] <= 1'b1;
      n_hold++;
      do @(posedge clk); while (hold_req[d]);
      hold_ack[d] <= 1'b0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < 2; d++) if (sub_ack[d]) begin n_ack++; sub_done[d] <= 1'b0; end
    if (rx_frame_sync) n_sync++;
    if (da_first && da_valid && pix_en) n_refresh++;
  end

  // ---------- DSP bus tasks ----------
  task automatic io_write(input int d, input logic [1:0] a, input logic [15:0] v);
    @(negedge clk); io_sel[d] = 1; io_we[d] = 1; io_addr[d] = a; io_wdata[d] = v;
    @(negedge clk); io_sel[d] = 0; io_we[d] = 0;
  endtask
  task automatic io_read(input int d, input logic [1:0] a, output logic [15:0] v);
    @(negedge clk); io_sel[d] = 1; io_we[d] = 0; io_addr[d] = a;
    @(posedge clk); #1; v = io_rdata[d];
    @(negedge clk); io_sel[d] = 0;
  endtask
  task automatic cm_write(input int d, input logic [15:0] a, input logic [15:0] v);
    @(negedge clk); cm_en[d] = 1; cm_we[d] = 1; cm_addr[d] = a; cm_wdata[d] = v;
    @(negedge clk); cm_en[d] = 0; cm_we[d] = 0;
  endtask
  task automatic cm_read(input int d, input logic [15:0] a, output logic [15:0] v);
    @(negedge clk); cm_en[d] = 1; cm_we[d] = 0; cm_addr[d] = a;
    @(posedge clk); #1; v = cm_rdata[d];
    @(negedge clk); cm_en[d] = 0;
  endtask

  // ---------- picture ----------
  function automatic logic [7:0] yv(int x, int y);  return 8'((x * 5 + y * 3) ^ (x * y)); endfunction
  function automatic logic [7:0] crv(int x, int y); return 8'(x * 7 + y * 2 + 30); endfunction
  function automatic logic [7:0] cbv(int x, int y); return 8'(x * 3 + y * 9 + 60); endfunction
  // sample at macroblock-order position s
  function automatic logic [7:0] mb_sample(int s);
    int mb, b, p, px, py;
    mb = s / 384; b = (s % 384) / 64; p = s % 64;
    if (b < 4) begin
      px = (mb % 11) * 16 + (b % 2) * 8 + p % 8; py = (mb / 11) * 16 + (b / 2) * 8 + p / 8;
      return yv(px, py);
    end
    px = ((mb % 11) * 8 + p % 8) * 2; py = ((mb / 11) * 8 + p / 8) * 2;
    return (b == 4) ? cbv(px, py) : crv(px, py);
  endfunction
  function automatic logic [15:0] pred_val(int i); return 16'(((i * 37) % 200) - 100); endfunction

  function automatic real rabs(real r); return (r < 0.0) ? -r : r; endfunction
  function automatic real cu(int u); return (u == 0) ? 1.0 / $sqrt(2.0) : 1.0; endfunction

  // ---------- transform engine ----------
  task automatic xform_block(input int a[64], input int qs);
    int lv[64];
    real F[64];
    real f;
    int recv;
    xf_qshift = 3'(qs);
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
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); xf_in_valid = 1; xf_in_data = 16'(a[i]);
    end
    @(negedge clk); xf_in_valid = 0;
    for (int i = 0; i < 64; i++) begin
      do @(posedge clk); while (!xf_lvl_valid);
      lv[i] = xf_lvl;
      checks++;
      if (rabs(real'(lv[i]) * (1 << qs) - F[i]) > (1 << qs) + 2.0) fail($sformatf("level %0d: %0d vs %f", i, lv[i], F[i]));
      checks++;
      if (xf_lvl_last != (i == 63)) fail($sformatf("level %0d: last flag %0b", i, xf_lvl_last));
      if (i == 63) n_qual[xf_qual]++;
    end
    recv = 0;
    while (recv < 64) begin
      @(posedge clk);
      if (xf_rec_valid) begin
        int x, y;
        real s;
        x = recv / 8; y = recv % 8;
        s = 0.0;
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++)
            s += cu(u) * cu(v) * lv[u * 8 + v] * (1 << qs)
                 * $cos(3.14159265358979 * (2 * x + 1) * u / 16.0)
                 * $cos(3.14159265358979 * (2 * y + 1) * v / 16.0);
        f = s / 4.0;
        checks++;
        if (rabs(real'(xf_rec) - f) > 2.0) fail($sformatf("reconstruction %0d: %0d vs %f", recv, xf_rec, f));
        recv++;
      end
    end
  endtask

  // ---------- bit streams ----------
  logic [15:0] words[2][2][$];   // [picture][dsp]
  bit          sent[$];
  logic [15:0] exp_rx[$];
  int          psc_pos[$];

  function automatic logic [15:0] payload();
    return 16'($urandom) | 16'h0101;   // never 16 zeros in a row
  endfunction

  task automatic dsp_stream(input int d, input int p);
    foreach (words[p][d][i]) begin
      @(negedge clk);
      while (vb_full[d]) begin n_stall++; @(negedge clk); end
      vb_wr[d] = 1; vb_wdata[d] = words[p][d][i];
      @(negedge clk); vb_wr[d] = 0;
      if (d == 1) repeat (40) @(negedge clk);
    end
    @(negedge clk); sub_done[d] = 1'b1;
    while (sub_done[d]) @(negedge clk);
  endtask

  // DSP 3: read FIFO3 and compare
  int n_rx = 0;
  always @(posedge clk) if (rst_n) begin
    if (f3_rd && !f3_empty) begin
      checks++;
      if (exp_rx.size() == 0 || f3_rdata !== exp_rx[0])
        fail($sformatf("FIFO3 word %0d: %h expected %h", n_rx, f3_rdata, exp_rx.size() ? exp_rx[0] : 16'h0));
      else if (f3_rdata == 16'hAB00) n_flush++;
      if (exp_rx.size() > 0) void'(exp_rx.pop_front());
      n_rx++;
    end
  end
  always @(negedge clk) f3_rd <= !f3_empty && exp_rx.size() > 0 && ($urandom_range(0, 3) == 0);

  initial begin
    logic [15:0] v;
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. predictions
    for (int i = 0; i < SUB0_SAMPLES; i++) cm_write(0, PRED_BASE + 16'(i), pred_val(i));
    for (int i = 0; i < SUB1_SAMPLES; i++) cm_write(1, PRED_BASE + 16'(i), 16'd0);

    // 2. acquisition
    io_write(0, 2'd0, 16'h0001);
    for (int py = 0; py < QCIF_H; py++)
      for (int px = 0; px < QCIF_W; px++) begin
        @(negedge clk);
        ad_valid = 1; ad_y = yv(px, py); ad_cr = crv(px, py); ad_cb = cbv(px, py);
        do @(posedge clk); while (!ad_ready);
        #1 ad_valid = 0;
      end
    do io_read(0, 2'd1, v); while (!v[1]);
    n_acq++;

    // 3. difference transfer
    io_write(1, 2'd0, 16'h0002);
    t0 = $time;
    do io_read(1, 2'd1, v); while (!v[3]);
    checks++;
    if (($time - t0) / 10 > 2 * FRAME_SAMPLES + 40) fail($sformatf("transfer took %0d cycles", ($time - t0) / 10));
    for (int i = 0; i < FRAME_SAMPLES; i++) begin
      int d, o;
      logic [15:0] e;
      d = (i < SUB0_SAMPLES) ? 0 : 1;
      o = d ? i - SUB0_SAMPLES : i;
      e = d ? 16'(mb_sample(i)) : 16'({8'd0, mb_sample(i)} - pred_val(o));
      cm_read(d, DIF_BASE + 16'(o), v);
      checks++;
      if (v !== e) fail($sformatf("DSP%0d difference %0d: %h expected %h", d, o, v, e));
      else if (d == 0) n_inter++;
      else n_intra++;
    end

    // 4. block transforms: first block of DSP 0's differences, a flat and a zero block
    begin
      int a[64];
      for (int i = 0; i < 64; i++) begin
        cm_read(0, DIF_BASE + 16'(i), v);
        a[i] = int'($signed(v));
      end
      xform_block(a, 1);
      for (int i = 0; i < 64; i++) a[i] = 40;
      xform_block(a, 2);
      for (int i = 0; i < 64; i++) a[i] = (i % 3) - 1;
      xform_block(a, 4);
    end

    // 5. bit streams of two pictures and the start code of a third
    words[0][0].push_back(16'h0000);
    words[0][0].push_back(16'h8000 | (payload() & 16'h03ff));
    repeat (1500) words[0][0].push_back(payload());
    repeat (700)  words[0][1].push_back(payload());
    words[0][1].push_back(16'hAB00);                         // 8 bits, then PSC starts
    words[1][0].push_back(16'h0080 | (payload() & 16'h0003)); // rest of the PSC
    repeat (300) words[1][0].push_back(payload());
    repeat (200) words[1][1].push_back(payload());
    words[1][1].push_back(16'h0000);                         // third PSC, aligned
    words[1][1].push_back(16'h8000);
    for (int p = 0; p < 2; p++)
      for (int d = 0; d < 2; d++)
        foreach (words[p][d][i]) for (int b = 15; b >= 0; b--) sent.push_back(words[p][d][i][b]);
    // start codes: bit 0, after picture 1's words less 8 bits, and the last two words
    psc_pos.push_back(0);
    psc_pos.push_back((words[0][0].size() + words[0][1].size()) * 16 - 8);
    psc_pos.push_back(sent.size() - 32);
    for (int k = 0; k < 2; k++) begin
      int n;
      n = psc_pos[k + 1] - psc_pos[k];
      for (int w = 0; w < (n + 15) / 16; w++) begin
        logic [15:0] e;
        for (int b = 0; b < 16; b++) e[15 - b] = (w * 16 + b < n) ? sent[psc_pos[k] + w * 16 + b] : 1'b0;
        exp_rx.push_back(e);
      end
    end
    // six more words after the last start code carry it through the decoder's
    // delay: the start code and the first two of them must arrive
    exp_rx.push_back(16'h0000);
    exp_rx.push_back(16'h8000);
    for (int k = 0; k < 6; k++) begin
      v = payload();
      words[1][1].push_back(v);
      if (k < 2) exp_rx.push_back(v);
    end
    fork
      forever begin @(negedge clk); tx_bit_en = ($urandom_range(0, 3) == 0); end
      begin
        for (int p = 0; p < 2; p++)
          fork
            dsp_stream(0, p);
            dsp_stream(1, p);
          join
        while (exp_rx.size() > 0) @(negedge clk);
        repeat (200) @(negedge clk);
      end
    join_any
    disable fork;
    tx_bit_en = 0;
    checks++;
    if (exp_rx.size() != 0) fail($sformatf("%0d words not received", exp_rx.size()));

    // DSP 3 data memory
    cm_read(0, 16'd0, v);
    @(negedge clk); dm_en = 1; dm_we = 1; dm_addr = 16'h1234; dm_wdata = 16'h5a5a;
    @(negedge clk); dm_we = 0;
    @(posedge clk); #1;
    checks++;
    if (dm_rdata !== 16'h5a5a) fail("DSP3 memory");
    @(negedge clk); dm_en = 0;

    // 6. decoder display path
    @(negedge clk); pic_start = 1;
    @(negedge clk); pic_start = 0;
    for (int s = 0; s < FRAME_SAMPLES; s++) begin
      @(negedge clk); pic_we = 1; pic_data = mb_sample(s);
    end
    @(negedge clk); pic_we = 0;
    begin
      int k;
      k = 0;
      while (k < Y_SAMPLES) begin
        @(negedge clk);
        pix_en = ($urandom_range(0, 1) == 1);
        @(posedge clk); #1;
        if (pix_en && da_valid) begin
          int px, py;
          px = k % QCIF_W; py = k / QCIF_W;
          checks++;
          if (da_y !== yv(px, py) || da_cr !== crv(px & ~1, py & ~1) || da_cb !== cbv(px & ~1, py & ~1)
              || da_first != (k == 0) || da_line != (px == 0))
            fail($sformatf("D/A pixel %0d: %h %h %h", k, da_y, da_cr, da_cb));
          k++;
        end
      end
    end
    @(negedge clk); pix_en = 0;

    // mechanisms
    checks++;
    if (n_acq < 1 || n_hold < 2 || n_inter == 0 || n_intra == 0 || n_stall == 0 || n_ack < 4 ||
        n_sync < 3 || n_flush == 0 || n_fec == 0 || n_qual[0] == 0 || n_qual[1] == 0 || n_qual[2] == 0 || n_refresh == 0)
      fail("a mechanism never happened");
    checks++;
    if (vb_overflow != 0 || rx_dropped) fail("buffer overflow");
    $display("mechanisms: acq %0d hold %0d inter %0d intra %0d stall %0d src-switch %0d sync %0d flush %0d qual %0d/%0d/%0d refresh %0d fec %0d",
      n_acq, n_hold, n_inter, n_intra, n_stall, n_ack, n_sync, n_flush, n_qual[0], n_qual[1], n_qual[2], n_refresh, n_fec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
