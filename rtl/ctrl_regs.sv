// FPGA2 control section: the register set through which the two coder DSPs run
// the acquisition (FPGA1), the difference transfer (FPGA2 processing section)
// and exchange messages with each other.
//
// Each DSP has an I/O port (sel, we, addr, wdata, rdata; read data registered,
// valid the cycle after the access). Register map:
//   0 CTRL   write: bit0 starts an acquisition, bit1 starts the difference
//            transfer (each a one-cycle pulse); reads back 0.
//   1 STATUS read: bit0 acquisition busy, bit1 acquisition done (sticky),
//            bit2 transfer busy, bit3 transfer done (sticky), bit4 mailbox 0->1
//            full, bit5 mailbox 1->0 full. Writing CTRL clears the done bits
//            of the operation it starts.
//   2 MBOX   write: post a 16-bit word to the other DSP's mailbox.
//   3 MBOX   read: take the word posted by the other DSP (clears its full flag).
// If both DSPs write CTRL in the same cycle, their start bits are ORed.
//
// The document says only that the control section holds registers controlling
// FPGA2's processing, FPGA1 and the data exchange between the DSPs; the map,
// the mailbox and the port timing are this design's.
module ctrl_regs (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       sel,
  input  logic [1:0]       we,
  input  logic [1:0][1:0]  addr,
  input  logic [1:0][15:0] wdata,
  output logic [1:0][15:0] rdata,
  // to and from the datapaths
  output logic             acq_start,
  input  logic             acq_busy,
  input  logic             acq_done,
  output logic             xfer_start,
  input  logic             xfer_busy,
  input  logic             xfer_done
);
  logic             acq_done_q, xfer_done_q;
  logic [1:0][15:0] mbox;       // mbox[d]: word posted by DSP d
  logic [1:0]       mbox_full;
  logic [15:0]      status;

  always_comb begin
    acq_start  = 1'b0;
    xfer_start = 1'b0;
    for (int d = 0; d < 2; d++) begin
      if (sel[d] && we[d] && addr[d] == 2'd0) begin
        acq_start  = acq_start  | wdata[d][0];
        xfer_start = xfer_start | wdata[d][1];
      end
    end
  end

  assign status = {10'd0, mbox_full[1], mbox_full[0], xfer_done_q, xfer_busy,
                   acq_done_q, acq_busy};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acq_done_q  <= 1'b0;
      xfer_done_q <= 1'b0;
      mbox        <= '0;
      mbox_full   <= '0;
      rdata       <= '0;
    end else begin
      if (acq_start)  acq_done_q  <= 1'b0;
      if (acq_done)   acq_done_q  <= 1'b1;
      if (xfer_start) xfer_done_q <= 1'b0;
      if (xfer_done)  xfer_done_q <= 1'b1;
      for (int d = 0; d < 2; d++) begin
        if (sel[d] && we[d] && addr[d] == 2'd2) begin
          mbox[d]      <= wdata[d];
          mbox_full[d] <= 1'b1;
        end
        if (sel[d] && !we[d]) begin
          unique case (addr[d])
            2'd1:    rdata[d] <= status;
            2'd3: begin
              rdata[d]       <= mbox[1-d];
              mbox_full[1-d] <= 1'b0;
            end
            default: rdata[d] <= '0;
          endcase
        end
      end
    end
  end
endmodule
