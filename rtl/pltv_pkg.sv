// Shared constants and address arithmetic of the power-line video link.
//
// The picture is QCIF (176x144 luminance, 88x72 for each chrominance component),
// grouped into 9 rows (GOBs) of 11 macroblocks; a macroblock holds four 8x8 Y
// blocks, one Cb block and one Cr block, stored one after the other (384 samples).
// The functions below give the macroblock-ordered position of a sample; the
// EPROM modules are filled from them, so the tables and the checking code share
// one definition of the layout.
// Each module uses only some of these constants, so a module linted on its own
// reports the rest as unused.
package pltv_pkg;

  localparam int unsigned QCIF_W        = 176;
  localparam int unsigned QCIF_H        = 144;
  localparam int unsigned C_W           = QCIF_W / 2;
  localparam int unsigned C_H           = QCIF_H / 2;
  localparam int unsigned MB_COLS       = 11;
  localparam int unsigned MB_ROWS       = 9;
  localparam int unsigned N_MB          = MB_COLS * MB_ROWS;     // 99
  localparam int unsigned MB_WORDS      = 384;                   // 4 Y + Cb + Cr blocks
  localparam int unsigned Y_SAMPLES     = QCIF_W * QCIF_H;       // 25344
  localparam int unsigned C_SAMPLES     = C_W * C_H;             // 6336
  localparam int unsigned FRAME_SAMPLES = Y_SAMPLES + 2 * C_SAMPLES; // 38016

  // Split of the picture between the two coder DSPs: whole GOBs.
  localparam int unsigned SPLIT_GOB     = 5;
  localparam int unsigned SUB0_SAMPLES  = SPLIT_GOB * MB_COLS * MB_WORDS;      // 21120
  localparam int unsigned SUB1_SAMPLES  = FRAME_SAMPLES - SUB0_SAMPLES;        // 16896

  // DSP data memory map (16-bit words).
  localparam logic [15:0] PRED_BASE     = 16'h2C00;  // previous reconstructed image
  localparam logic [15:0] DIF_BASE      = 16'h8000;  // difference image written by FPGA2

  // H.263 picture start code, 22 bits.
  localparam logic [21:0] PSC           = 22'b0000_0000_0000_0000_1000_00;

  // Sample kinds delivered by the A/D.
  typedef enum logic [1:0] {COMP_Y = 2'd0, COMP_CB = 2'd1, COMP_CR = 2'd2} comp_e;

  // Block qualification made while quantizing: every coefficient zero, only the
  // DC coefficient non-zero, or anything else.
  typedef enum logic [1:0] {QUAL_ZERO = 2'd0, QUAL_DC = 2'd1, QUAL_FULL = 2'd2} qual_e;

  // Acquisition index (Y raster, then Cb raster, then Cr raster) -> position of the
  // sample in the macroblock-ordered frame buffer.
  function automatic logic [15:0] mb_order_addr(input int unsigned idx);
    int unsigned x, y, mb, blk, pos;
    if (idx < Y_SAMPLES) begin
      x   = idx % QCIF_W;
      y   = idx / QCIF_W;
      mb  = (y / 16) * MB_COLS + x / 16;
      blk = ((y % 16) / 8) * 2 + (x % 16) / 8;
      pos = (y % 8) * 8 + x % 8;
    end else begin
      int unsigned c;
      c   = (idx < Y_SAMPLES + C_SAMPLES) ? idx - Y_SAMPLES : idx - Y_SAMPLES - C_SAMPLES;
      blk = (idx < Y_SAMPLES + C_SAMPLES) ? 4 : 5;
      x   = c % C_W;
      y   = c / C_W;
      mb  = (y / 8) * MB_COLS + x / 8;
      pos = (y % 8) * 8 + x % 8;
    end
    return 16'(mb * MB_WORDS + blk * 64 + pos);
  endfunction

  // Raster pixel index -> address inside the luminance dual-port RAM, which holds
  // the Y blocks in macroblock order (256 samples per macroblock).
  function automatic logic [14:0] y_ram_addr(input int unsigned pix);
    int unsigned x, y, mb, blk;
    x   = pix % QCIF_W;
    y   = pix / QCIF_W;
    mb  = (y / 16) * MB_COLS + x / 16;
    blk = ((y % 16) / 8) * 2 + (x % 16) / 8;
    return 15'(mb * 256 + blk * 64 + (y % 8) * 8 + x % 8);
  endfunction

  // Raster pixel index -> address inside a chrominance dual-port RAM (64 samples
  // per macroblock); each chrominance sample covers 2x2 luminance pixels.
  function automatic logic [12:0] c_ram_addr(input int unsigned pix);
    int unsigned x, y, mb;
    x   = (pix % QCIF_W) / 2;
    y   = (pix / QCIF_W) / 2;
    mb  = (y / 8) * MB_COLS + x / 8;
    return 13'(mb * 64 + (y % 8) * 8 + x % 8);
  endfunction

endpackage
