// Coder microcontroller function: merges the two video buffers into one serial
// bit stream for the transmitter (the convolutional encoder of the modem).
//
// The two coder DSPs each code one sub-image and write its bit stream, packed
// into 16-bit words, into their own FIFO. This block reads the words of FIFO 0
// and sends them MSB first, one bit per bit_en strobe from the modem; when FIFO 0
// is empty and DSP 0 signals that its sub-image is complete (sub_done[0]), it
// answers with a one-cycle sub_ack[0] and continues with FIFO 1 in the same way,
// then returns to FIFO 0 for the next picture. Thus a picture goes out as DSP 0's
// stream followed by DSP 1's, and the two streams are concatenated bit-exactly.
//
// Timing: tx_bit is valid while tx_valid is high and is consumed by the bit_en
// strobe; fetching the next word takes one clock, during which tx_valid is low.
// The document gives the function (two buffers of 16-bit words to one bit
// stream); the sub_done/sub_ack handshake, taken from the lines that connect the
// microcontroller with each DSP in the coding-architecture figure, and the fixed
// order are this design's reading.
module tx_merge (
  input  logic             clk,
  input  logic             rst_n,
  // FIFO read sides
  input  logic [1:0]       fifo_empty,
  input  logic [1:0][15:0] fifo_rdata,
  output logic [1:0]       fifo_rd,
  // per-DSP end of sub-image handshake
  input  logic [1:0]       sub_done,
  output logic [1:0]       sub_ack,
  // serial output
  input  logic             bit_en,
  output logic             tx_bit,
  output logic             tx_valid,
  output logic             src       // FIFO being drained
);
  typedef enum logic {S_LOAD, S_SHIFT} state_e;
  state_e      state;
  logic [15:0] sh;
  logic [3:0]  left;   // bits still to send, minus one

  assign tx_bit   = sh[15];
  assign tx_valid = (state == S_SHIFT);

  always_comb begin
    fifo_rd = '0;
    if (state == S_LOAD && !fifo_empty[src]) fifo_rd[src] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_LOAD;
      sh      <= '0;
      left    <= '0;
      src     <= 1'b0;
      sub_ack <= '0;
    end else begin
      sub_ack <= '0;
      unique case (state)
        S_LOAD: begin
          if (!fifo_empty[src]) begin
            sh    <= fifo_rdata[src];
            left  <= 4'd15;
            state <= S_SHIFT;
          end else if (sub_done[src] && !sub_ack[src]) begin
            sub_ack[src] <= 1'b1;
            src          <= ~src;
          end
        end
        S_SHIFT: if (bit_en) begin
          sh <= {sh[14:0], 1'b0};
          if (left == 4'd0) state <= S_LOAD;
          else              left  <= left - 4'd1;
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
