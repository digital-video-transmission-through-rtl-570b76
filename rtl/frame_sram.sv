// Frame SRAM of the coder: a single-port static RAM that holds one acquired QCIF
// picture (38016 samples of 8 bits) in macroblock order. FPGA1 writes it during
// acquisition and FPGA2 reads it while building the difference image.
//
// Interface: one port, en/we/addr/wdata, with the read data registered
// (rdata is valid the cycle after a read with en=1 and we=0).
// The document names the part only; depth and the synchronous read are choices
// of this design (64K x 8, the smallest power of two holding a frame).
module frame_sram #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
