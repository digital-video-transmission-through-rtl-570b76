// FPGA1 of the coder: acquisition formatting.
//
// The A/D delivers one pixel per handshake (pix_valid/pix_ready) on three 8-bit
// buses, Y, Cr and Cb, in raster order over a 176x144 QCIF picture. FPGA1 keeps
// the luminance of every pixel and the chrominance of the pixels on even rows and
// even columns (4:2:0), and writes each kept sample into the frame SRAM at the
// address that the acquisition EPROM holds for its index. The index is the
// sample's position in acquisition order: Y raster index, then 25344 + Cb raster
// index, then 31680 + Cr raster index. The EPROM turns this into macroblock order.
//
// Sequence per pixel: accept the pixel and read the EPROM for its Y index (1
// cycle), write Y into the SRAM while reading the Cb index, write Cb while
// reading the Cr index, write Cr. A pixel therefore takes 2 cycles, or 4 when it
// carries chrominance. start (from the FPGA2 control registers) arms a new
// picture; done pulses after the last sample is written.
//
// From the document: the EPROM-driven write sequence into the SRAM and the
// block/macroblock grouping. This design's choices: the pixel handshake, the
// 4:2:0 decimation by keeping even rows and columns, and the acquisition order.
//
// The EPROM data is the SRAM address, wired straight through.
module acq_formatter
  import pltv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  // A/D side
  input  logic        pix_valid,
  output logic        pix_ready,
  input  logic [7:0]  y_in,
  input  logic [7:0]  cr_in,
  input  logic [7:0]  cb_in,
  // acquisition EPROM
  output logic        rom_en,
  output logic [15:0] rom_addr,
  input  logic [15:0] rom_data,
  // frame SRAM
  output logic        sram_en,
  output logic        sram_we,
  output logic [15:0] sram_addr,
  output logic [7:0]  sram_wdata
);
  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_WY, S_WCB, S_WCR} state_e;
  state_e state;

  logic [7:0] col, row;
  logic [7:0] y_q, cr_q, cb_q;
  logic       chroma_q;
  logic       last_pix;

  assign last_pix  = (col == 8'(QCIF_W - 1)) && (row == 8'(QCIF_H - 1));
  assign busy      = (state != S_IDLE);
  assign pix_ready = (state == S_WAIT);

  // EPROM index of the samples of the current pixel
  logic [15:0] y_idx, c_idx;
  assign y_idx = 16'(row * QCIF_W + col);
  assign c_idx = 16'(32'(row[7:1]) * C_W + 32'(col[7:1]));

  always_comb begin
    rom_en   = 1'b0;
    rom_addr = y_idx;
    unique case (state)
      S_WAIT: begin rom_en = pix_valid; rom_addr = y_idx; end
      S_WY:   begin rom_en = chroma_q;  rom_addr = 16'(Y_SAMPLES) + c_idx; end
      S_WCB:  begin rom_en = 1'b1;      rom_addr = 16'(Y_SAMPLES + C_SAMPLES) + c_idx; end
      default: ;
    endcase
  end

  always_comb begin
    sram_en    = (state == S_WY) || (state == S_WCB) || (state == S_WCR);
    sram_we    = sram_en;
    sram_addr  = rom_data;
    unique case (state)
      S_WCB:   sram_wdata = cb_q;
      S_WCR:   sram_wdata = cr_q;
      default: sram_wdata = y_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      col      <= '0;
      row      <= '0;
      y_q      <= '0;
      cr_q     <= '0;
      cb_q     <= '0;
      chroma_q <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          col   <= '0;
          row   <= '0;
          state <= S_WAIT;
        end
        S_WAIT: if (pix_valid) begin
          y_q      <= y_in;
          cr_q     <= cr_in;
          cb_q     <= cb_in;
          chroma_q <= !col[0] && !row[0];
          state    <= S_WY;
        end
        S_WY:  state <= chroma_q ? S_WCB : S_WAIT;
        S_WCB: state <= S_WCR;
        S_WCR: state <= S_WAIT;
        default: state <= S_IDLE;
      endcase
      // advance the raster position once the pixel's last sample is written
      if ((state == S_WY && !chroma_q) || state == S_WCR) begin
        if (last_pix) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end else if (col == 8'(QCIF_W - 1)) begin
          col <= '0;
          row <= row + 8'd1;
        end else begin
          col <= col + 8'd1;
        end
      end
    end
  end
endmodule
