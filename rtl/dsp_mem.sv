// External data memory of one TMS320C50 DSP (64K words of 16 bits), with the bus
// switch that lets FPGA2 use it while the DSP is in HOLD.
//
// When hold is low the DSP port owns the memory; when hold is high (the DSP has
// acknowledged a HOLD request and floated its buses) the DMA port owns it. The
// document gives the sharing scheme (the DSP enters HOLD once per picture while
// FPGA2 writes its memory); the single clock, the registered read data (one
// cycle after the address) and the word size of the map are this design's choices.
// An assertion flags a DSP access during HOLD, which the real DSP cannot make.
module dsp_mem #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          hold,
  // DSP side
  input  logic          dsp_en,
  input  logic          dsp_we,
  input  logic [AW-1:0] dsp_addr,
  input  logic [DW-1:0] dsp_wdata,
  // DMA (FPGA2) side
  input  logic          dma_en,
  input  logic          dma_we,
  input  logic [AW-1:0] dma_addr,
  input  logic [DW-1:0] dma_wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];
  logic          en, we;
  logic [AW-1:0] addr;
  logic [DW-1:0] wdata;

  always_comb begin
    if (hold) begin
      en = dma_en; we = dma_we; addr = dma_addr; wdata = dma_wdata;
    end else begin
      en = dsp_en; we = dsp_we; addr = dsp_addr; wdata = dsp_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

  a_no_dsp_access_in_hold: assert property (@(posedge clk) hold |-> !dsp_en)
    else $error("DSP bus access while the memory is held by the DMA");
endmodule
