// FPGA3 demultiplexing section of the decoder: spreads the decoded samples
// written by DSP3 over the Y, Cr and Cb dual-port RAMs.
//
// DSP3 writes the reconstructed picture one 8-bit sample per write strobe
// (dsp_we), macroblock after macroblock, each macroblock as its four Y blocks,
// then the Cb block, then the Cr block (384 samples). The data bus goes straight
// to all three RAMs; this block only counts the samples and produces the write
// enable and address of the RAM each sample belongs to: Y samples go to
// consecutive addresses of the Y RAM (256 per macroblock), Cb and Cr samples to
// consecutive addresses of their RAM (64 per macroblock). frame_start (DSP3 marks
// the first sample of a picture) resets the counters; frame_done pulses after the
// 38016th sample.
//
// Timing: combinational from dsp_we to the RAM write strobes, counters advance
// at the clock edge of the write. The document gives the demultiplexing into
// three RAMs with addresses generated in FPGA3; the macroblock write order of
// DSP3 and the frame_start strobe are this design's choices.
module ycc_demux
  import pltv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_start,
  input  logic        dsp_we,
  output logic        we_y,
  output logic        we_cr,
  output logic        we_cb,
  output logic [14:0] addr_y,
  output logic [12:0] addr_c,
  output logic        frame_done
);
  logic [8:0]  pos;     // 0..383 inside the macroblock
  logic [6:0]  mb;      // 0..98
  logic [14:0] ya;
  logic [12:0] cba, cra;

  always_comb begin
    we_y   = dsp_we && (pos < 9'd256);
    we_cb  = dsp_we && (pos >= 9'd256) && (pos < 9'd320);
    we_cr  = dsp_we && (pos >= 9'd320);
    addr_y = ya;
    addr_c = we_cr ? cra : cba;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos        <= '0;
      mb         <= '0;
      ya         <= '0;
      cba        <= '0;
      cra        <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (frame_start) begin
        pos <= '0;
        mb  <= '0;
        ya  <= '0;
        cba <= '0;
        cra <= '0;
      end else if (dsp_we) begin
        if (we_y)  ya  <= ya  + 15'd1;
        if (we_cb) cba <= cba + 13'd1;
        if (we_cr) cra <= cra + 13'd1;
        if (pos == 9'(MB_WORDS - 1)) begin
          pos <= '0;
          if (mb == 7'(N_MB - 1)) begin
            mb         <= '0;
            ya         <= '0;
            cba        <= '0;
            cra        <= '0;
            frame_done <= 1'b1;
          end else begin
            mb <= mb + 7'd1;
          end
        end else begin
          pos <= pos + 9'd1;
        end
      end
    end
  end
endmodule
