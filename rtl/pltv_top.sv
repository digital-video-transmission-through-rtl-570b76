// Digital part of a video link over the mains wiring: an H.263 QCIF coder with
// two DSPs, a serial link to the power-line modem, and a one-DSP decoder.
//
// Coder: the A/D samples enter FPGA1 (acq_formatter), which writes them into the
// frame SRAM in macroblock order using the acquisition EPROM. FPGA2 (diff_dma)
// then takes each coder DSP off its bus in turn, subtracts the prediction held in
// that DSP's memory from the new picture and leaves the difference image there;
// its control registers (ctrl_regs) are how the DSPs start both steps and talk
// to each other. The DSPs (outside this design; their buses are ports) code
// their sub-images and write 16-bit words into FIFO1/FIFO2; tx_merge turns both
// into one bit stream, and conv_enc protects it with a rate 1/2 convolutional
// code for the modem.
// Decoder: viterbi_dec corrects the code pairs from the modem, rx_align finds
// the picture start code in the decoded bit stream and packs it into 16-bit
// words in FIFO3 for DSP3; DSP3 writes the decoded
// picture through ycc_demux into the Y, Cr and Cb dual-port RAMs, and disp_scan
// reads them out in raster order, through the display EPROMs, for the D/A.
// Block transform kernels: dct_q (DCT + quantizer + qualification) feeds idct_dq
// (dequantizer + IDCT) as in the coder's prediction loop; they are brought out as
// a stand-alone engine for the coding step of the DSPs.
//
// One clock runs everything; the frame SRAM belongs to FPGA1 while it acquires
// and to FPGA2 otherwise. The GMSK modem and line interfaces, the DSPs, the A/D
// and the D/A are outside; their signals are ports.
//
// Status outputs the board does not need (FIFO fill counts, merge source, the
// busy flags already reported through ctrl_regs, the display running flag) are
// left open. rst_n also disables the assertions in diff_dma and dsp_mem, which
// lint reports as a reset used synchronously; the assertions are not logic.
module pltv_top
  import pltv_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // A/D (Bt812) sample bus
  input  logic             ad_valid,
  output logic             ad_ready,
  input  logic [7:0]       ad_y,
  input  logic [7:0]       ad_cr,
  input  logic [7:0]       ad_cb,
  // coder DSPs: I/O port to the FPGA2 registers
  input  logic [1:0]       io_sel,
  input  logic [1:0]       io_we,
  input  logic [1:0][1:0]  io_addr,
  input  logic [1:0][15:0] io_wdata,
  output logic [1:0][15:0] io_rdata,
  // coder DSPs: data memory bus and HOLD
  input  logic [1:0]       cm_en,
  input  logic [1:0]       cm_we,
  input  logic [1:0][15:0] cm_addr,
  input  logic [1:0][15:0] cm_wdata,
  output logic [1:0][15:0] cm_rdata,
  output logic [1:0]       hold_req,
  input  logic [1:0]       hold_ack,
  // coder DSPs: video buffers and end-of-sub-image handshake
  input  logic [1:0]       vb_wr,
  input  logic [1:0][15:0] vb_wdata,
  output logic [1:0]       vb_full,
  input  logic [1:0]       sub_done,
  output logic [1:0]       sub_ack,
  // to the modem transmitter: one code pair per strobe
  input  logic             tx_bit_en,
  output logic [1:0]       tx_code,
  output logic             tx_valid,
  // from the modem receiver: one (hard-decided) code pair per rx_valid
  input  logic             rx_valid,
  input  logic [1:0]       rx_code,
  output logic             rx_locked,
  output logic             rx_frame_sync,
  // decoder DSP3: FIFO3, data memory, picture output
  input  logic             f3_rd,
  output logic [15:0]      f3_rdata,
  output logic             f3_empty,
  input  logic             dm_en,
  input  logic             dm_we,
  input  logic [15:0]      dm_addr,
  input  logic [15:0]      dm_wdata,
  output logic [15:0]      dm_rdata,
  input  logic             pic_start,
  input  logic             pic_we,
  input  logic [7:0]       pic_data,
  // D/A (Bt858)
  input  logic             pix_en,
  output logic [7:0]       da_y,
  output logic [7:0]       da_cr,
  output logic [7:0]       da_cb,
  output logic             da_valid,
  output logic             da_first,
  output logic             da_line,
  // block transform engine
  input  logic [2:0]       xf_qshift,
  input  logic             xf_in_valid,
  input  logic signed [15:0] xf_in_data,
  output logic             xf_lvl_valid,
  output logic             xf_lvl_last,
  output logic signed [15:0] xf_lvl,
  output qual_e            xf_qual,
  output logic             xf_rec_valid,
  output logic             xf_rec_last,
  output logic signed [15:0] xf_rec,
  // buffer status
  output logic [2:0]       vb_overflow,
  output logic             rx_dropped
);
  // ---------------- coder: acquisition ----------------
  logic        acq_start, acq_busy, acq_done;
  logic        xfer_start, xfer_busy, xfer_done;
  logic        rom_en;
  logic [15:0] rom_addr, rom_data;
  logic        f1_en, f1_we;
  logic [15:0] f1_addr;
  logic [7:0]  f1_wdata;
  logic        f2_en;
  logic [15:0] f2_addr;
  logic [7:0]  sram_rdata;

  ctrl_regs u_ctrl (
    .clk, .rst_n, .sel(io_sel), .we(io_we), .addr(io_addr), .wdata(io_wdata),
    .rdata(io_rdata), .acq_start, .acq_busy, .acq_done,
    .xfer_start, .xfer_busy, .xfer_done
  );

  acq_formatter u_fpga1 (
    .clk, .rst_n, .start(acq_start), .busy(acq_busy), .done(acq_done),
    .pix_valid(ad_valid), .pix_ready(ad_ready), .y_in(ad_y), .cr_in(ad_cr), .cb_in(ad_cb),
    .rom_en, .rom_addr, .rom_data,
    .sram_en(f1_en), .sram_we(f1_we), .sram_addr(f1_addr), .sram_wdata(f1_wdata)
  );

  acq_eprom u_acq_rom (.clk, .en(rom_en), .addr(rom_addr), .data(rom_data));

  frame_sram u_sram (
    .clk,
    .en   (acq_busy ? f1_en    : f2_en),
    .we   (acq_busy ? f1_we    : 1'b0),
    .addr (acq_busy ? f1_addr  : f2_addr),
    .wdata(f1_wdata),
    .rdata(sram_rdata)
  );

  // ---------------- coder: difference DMA into the DSP memories ----------------
  logic [1:0]       dma_en;
  logic             dma_we;
  logic [15:0]      dma_addr, dma_wdata;
  logic [1:0][15:0] mem_rdata;

  diff_dma u_fpga2 (
    .clk, .rst_n, .start(xfer_start), .busy(xfer_busy), .done(xfer_done),
    .sram_en(f2_en), .sram_addr(f2_addr), .sram_rdata,
    .hold_req, .hold_ack,
    .mem_en(dma_en), .mem_we(dma_we), .mem_addr(dma_addr), .mem_wdata(dma_wdata),
    .mem_rdata
  );

  for (genvar d = 0; d < 2; d++) begin : g_cdsp
    dsp_mem u_mem (
      .clk, .hold(hold_ack[d]),
      .dsp_en(cm_en[d]), .dsp_we(cm_we[d]), .dsp_addr(cm_addr[d]), .dsp_wdata(cm_wdata[d]),
      .dma_en(dma_en[d]), .dma_we(dma_we), .dma_addr(dma_addr), .dma_wdata(dma_wdata),
      .rdata(mem_rdata[d])
    );
    assign cm_rdata[d] = mem_rdata[d];
  end

  // ---------------- coder: video buffers and serialiser ----------------
  logic [1:0]       vb_empty, vb_rd;
  logic [1:0][15:0] vb_rdata;

  for (genvar d = 0; d < 2; d++) begin : g_vb
    video_fifo u_fifo (
      .clk, .rst_n, .wr_en(vb_wr[d]), .wdata(vb_wdata[d]), .full(vb_full[d]),
      .rd_en(vb_rd[d]), .rdata(vb_rdata[d]), .empty(vb_empty[d]), .count(),
      .overflow(vb_overflow[d])
    );
  end

  logic mg_bit, mg_valid;

  tx_merge u_tx_uc (
    .clk, .rst_n, .fifo_empty(vb_empty), .fifo_rdata(vb_rdata), .fifo_rd(vb_rd),
    .sub_done, .sub_ack, .bit_en(tx_bit_en), .tx_bit(mg_bit), .tx_valid(mg_valid), .src()
  );

  conv_enc u_fec_enc (
    .clk, .rst_n, .in_valid(mg_valid), .in_bit(mg_bit), .in_take(tx_bit_en),
    .out_valid(tx_valid), .code(tx_code)
  );

  // ---------------- decoder: frame alignment and FIFO3 ----------------
  logic        al_wr, f3_full;
  logic [15:0] al_wdata;

  logic dec_valid, dec_bit;

  viterbi_dec u_fec_dec (
    .clk, .rst_n, .in_valid(rx_valid), .in_code(rx_code),
    .out_valid(dec_valid), .out_bit(dec_bit)
  );

  rx_align u_rx_uc (
    .clk, .rst_n, .rx_valid(dec_valid), .rx_bit(dec_bit), .wr_en(al_wr), .wdata(al_wdata),
    .fifo_full(f3_full), .frame_sync(rx_frame_sync), .locked(rx_locked),
    .dropped(rx_dropped)
  );

  video_fifo u_fifo3 (
    .clk, .rst_n, .wr_en(al_wr), .wdata(al_wdata), .full(f3_full),
    .rd_en(f3_rd), .rdata(f3_rdata), .empty(f3_empty), .count(),
    .overflow(vb_overflow[2])
  );

  dsp_mem u_dsp3_mem (
    .clk, .hold(1'b0),
    .dsp_en(dm_en), .dsp_we(dm_we), .dsp_addr(dm_addr), .dsp_wdata(dm_wdata),
    .dma_en(1'b0), .dma_we(1'b0), .dma_addr('0), .dma_wdata('0),
    .rdata(dm_rdata)
  );

  // ---------------- decoder: FPGA3, dual-port RAMs, display EPROMs ----------------
  logic        we_y, we_cr, we_cb, frame_ready;
  logic [14:0] wa_y;
  logic [12:0] wa_c;
  logic        drom_en, dram_en;
  logic [14:0] pix_cnt, rom_y, rom_cr, rom_cb, ra_y;
  logic [12:0] ra_cr, ra_cb;
  logic [7:0]  rd_y, rd_cr, rd_cb;

  ycc_demux u_fpga3_dmx (
    .clk, .rst_n, .frame_start(pic_start), .dsp_we(pic_we),
    .we_y, .we_cr, .we_cb, .addr_y(wa_y), .addr_c(wa_c), .frame_done(frame_ready)
  );

  dp_ram #(.AW(15)) u_ram_y  (.clk_a(clk), .we_a(we_y),  .addr_a(wa_y), .wdata_a(pic_data),
                              .clk_b(clk), .en_b(dram_en), .addr_b(ra_y),  .rdata_b(rd_y));
  dp_ram #(.AW(13)) u_ram_cr (.clk_a(clk), .we_a(we_cr), .addr_a(wa_c), .wdata_a(pic_data),
                              .clk_b(clk), .en_b(dram_en), .addr_b(ra_cr), .rdata_b(rd_cr));
  dp_ram #(.AW(13)) u_ram_cb (.clk_a(clk), .we_a(we_cb), .addr_a(wa_c), .wdata_a(pic_data),
                              .clk_b(clk), .en_b(dram_en), .addr_b(ra_cb), .rdata_b(rd_cb));

  disp_eprom #(.CHROMA(1'b0)) u_rom_y  (.clk, .en(drom_en), .addr(pix_cnt), .data(rom_y));
  disp_eprom #(.CHROMA(1'b1)) u_rom_cr (.clk, .en(drom_en), .addr(pix_cnt), .data(rom_cr));
  disp_eprom #(.CHROMA(1'b1)) u_rom_cb (.clk, .en(drom_en), .addr(pix_cnt), .data(rom_cb));

  disp_scan u_fpga3_out (
    .clk, .rst_n, .frame_ready, .pix_en,
    .rom_en(drom_en), .pix_cnt, .rom_y, .rom_cr, .rom_cb,
    .ram_en(dram_en), .ram_addr_y(ra_y), .ram_addr_cr(ra_cr), .ram_addr_cb(ra_cb),
    .ram_y(rd_y), .ram_cr(rd_cr), .ram_cb(rd_cb),
    .y_out(da_y), .cr_out(da_cr), .cb_out(da_cb),
    .out_valid(da_valid), .out_first(da_first), .out_line(da_line), .running()
  );

  // ---------------- block transform engine: DCT+Q -> Q^-1+IDCT ----------------

  dct_q u_dct (
    .clk, .rst_n, .qshift(xf_qshift), .in_valid(xf_in_valid), .in_data(xf_in_data),
    .out_valid(xf_lvl_valid), .out_last(xf_lvl_last), .out_level(xf_lvl), .qual(xf_qual),
    .busy()
  );

  idct_dq u_idct (
    .clk, .rst_n, .qshift(xf_qshift), .in_valid(xf_lvl_valid), .in_level(xf_lvl),
    .in_qual(xf_qual), .out_valid(xf_rec_valid), .out_last(xf_rec_last),
    .out_data(xf_rec), .busy()
  );
endmodule
