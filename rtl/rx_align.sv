// Receiver microcontroller function: H.263 frame alignment into 16-bit words.
//
// Received bits (rx_bit, taken when rx_valid is high) pass through a 22-bit
// delay line. When the delay line holds the picture start code
// (0000 0000 0000 0000 1000 00), the bits leaving it from then on are packed MSB
// first into 16-bit words, so that every picture starts on a word boundary with
// the start code; a word still partly filled when a new start code appears is
// completed with zeros and written out first. Bits received before the first
// start code are dropped. Each full word is written to FIFO3 (wr_en/wdata).
//
// Timing: a word is written in the cycle after its last bit is accepted; bits
// come out 22 accepted bits after they go in. frame_sync pulses when a start code
// is found; locked stays high after the first one.
// The document gives the function (synchronisation and storage of 16-bit words);
// the delay-line search, zero completion of a partial word and dropping of
// unsynchronised bits are this design's choices. The start code is the H.263 one.
module rx_align
  import pltv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_valid,
  input  logic        rx_bit,
  output logic        wr_en,
  output logic [15:0] wdata,
  input  logic        fifo_full,
  output logic        frame_sync,
  output logic        locked,
  output logic        dropped    // sticky: a word was lost on a full FIFO
);
  logic [21:0] hist;
  logic [4:0]  fill;    // valid bits in hist, saturating at 22
  logic [15:0] word;
  logic [4:0]  cnt;     // bits in word

  logic [21:0] hist_n;
  logic        pop, match;
  logic [15:0] word_n;
  logic [4:0]  cnt_n;

  always_comb begin
    hist_n = {hist[20:0], rx_bit};
    pop    = rx_valid && (fill == 5'd22) && locked;
    match  = rx_valid && (hist_n == PSC) && (fill >= 5'd21);
    word_n = pop ? {word[14:0], hist[21]} : word;
    cnt_n  = pop ? cnt + 5'd1 : cnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist       <= '0;
      fill       <= '0;
      word       <= '0;
      cnt        <= '0;
      wr_en      <= 1'b0;
      wdata      <= '0;
      frame_sync <= 1'b0;
      locked     <= 1'b0;
      dropped    <= 1'b0;
    end else begin
      wr_en      <= 1'b0;
      frame_sync <= 1'b0;
      if (rx_valid) begin
        hist <= hist_n;
        if (fill != 5'd22) fill <= fill + 5'd1;
        word <= word_n;
        cnt  <= cnt_n;
        if (cnt_n == 5'd16) begin
          wr_en <= 1'b1;
          wdata <= word_n;
          cnt   <= '0;
          if (fifo_full) dropped <= 1'b1;
        end else if (match && cnt_n != 5'd0) begin
          wr_en <= 1'b1;
          wdata <= word_n << (5'd16 - cnt_n);
          cnt   <= '0;
          if (fifo_full) dropped <= 1'b1;
        end
        if (match) begin
          locked     <= 1'b1;
          frame_sync <= 1'b1;
        end
      end
    end
  end
endmodule
