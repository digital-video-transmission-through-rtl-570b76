// FPGA2 processing section of the coder: builds the difference image in the
// memories of the two coder DSPs.
//
// On start it serves DSP 0 and then DSP 1. For each it raises hold_req and waits
// for hold_ack (the DSP has floated its buses), then for every sample of that
// DSP's sub-image reads the new sample from the frame SRAM and the prediction
// from the DSP memory at PRED_BASE+i (2C00H), subtracts, and writes the 16-bit
// difference to the DSP memory at DIF_BASE+i; then it drops hold_req. Sub-image
// 0 is SRAM words 0..SUB0_SAMPLES-1 (GOBs 0-4), sub-image 1 the rest (GOBs 5-8).
// Each sample takes two cycles (read, then write), so a QCIF picture takes
// 2 x 38016 cycles plus the HOLD handshakes. done pulses at the end.
// If the DSP has cleared the prediction area, the result is the picture itself,
// which is how INTRA coding is obtained.
//
// From the document: the subtraction of the stored prediction from the SRAM
// sample, the 2C00H base of the prediction, the DMA while the DSP is held and
// the split into two non-overlapping sub-images. This design's choices: the
// difference area base (8000H), the split on GOB boundaries and the handshake.
//
// rst_n also gates the HOLD-check assertion (disable iff), so lint sees it used
// both as an asynchronous reset and as a plain signal; the assertion is not logic.
module diff_dma
  import pltv_pkg::*;
#(
  parameter int unsigned N0   = SUB0_SAMPLES,
  parameter int unsigned N1   = SUB1_SAMPLES,
  parameter logic [15:0] PRED = PRED_BASE,
  parameter logic [15:0] DIF  = DIF_BASE
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // frame SRAM read port
  output logic              sram_en,
  output logic [15:0]       sram_addr,
  input  logic [7:0]        sram_rdata,
  // HOLD handshake with the two DSPs
  output logic [1:0]        hold_req,
  input  logic [1:0]        hold_ack,
  // DMA port into the DSP memories (en per DSP, the rest shared)
  output logic [1:0]        mem_en,
  output logic              mem_we,
  output logic [15:0]       mem_addr,
  output logic [15:0]       mem_wdata,
  input  logic [1:0][15:0]  mem_rdata
);
  typedef enum logic [2:0] {S_IDLE, S_HOLD, S_RD, S_WR, S_REL} state_e;
  state_e      state;
  logic        dsp;       // DSP being served
  logic [15:0] i;         // sample offset inside the sub-image
  logic [15:0] n_last;

  assign n_last = dsp ? 16'(N1 - 1) : 16'(N0 - 1);
  assign busy   = (state != S_IDLE);

  always_comb begin
    sram_en   = (state == S_RD);
    sram_addr = (dsp ? 16'(N0) : 16'd0) + i;
    mem_en    = '0;
    mem_we    = (state == S_WR);
    mem_addr  = (state == S_WR) ? DIF + i : PRED + i;
    mem_wdata = {8'd0, sram_rdata} - mem_rdata[dsp];
    if (state == S_RD || state == S_WR) mem_en[dsp] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      dsp      <= 1'b0;
      i        <= '0;
      hold_req <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          dsp         <= 1'b0;
          i           <= '0;
          hold_req[0] <= 1'b1;
          state       <= S_HOLD;
        end
        S_HOLD: if (hold_ack[dsp]) state <= S_RD;
        S_RD:   state <= S_WR;
        S_WR: begin
          if (i == n_last) begin
            hold_req[dsp] <= 1'b0;
            state         <= S_REL;
          end else begin
            i     <= i + 16'd1;
            state <= S_RD;
          end
        end
        S_REL: if (!hold_ack[dsp]) begin
          if (dsp) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            dsp         <= 1'b1;
            i           <= '0;
            hold_req[1] <= 1'b1;
            state       <= S_HOLD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_access_only_in_hold: assert property (@(posedge clk) disable iff (!rst_n)
      |mem_en |-> (hold_req[dsp] && hold_ack[dsp]))
    else $error("DMA access to a DSP memory without HOLD");
endmodule
