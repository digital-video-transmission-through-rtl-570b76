// Acquisition address EPROM of the coder (next to FPGA1).
// For every sample index in acquisition order (the Y plane in raster order, then
// Cb, then Cr, each in raster order) it holds the address in the frame SRAM
// where that sample belongs when the picture is stored in H.263 macroblock order:
// macroblock n starts at n*384 with its four Y blocks, then Cb, then Cr, each
// block row by row.
//
// The table has 38016 words of 16 bits and is computed at elaboration from
// pltv_pkg::mb_order_addr; the document states only that the write sequence is
// stored in an EPROM. Read is synchronous: data one cycle after the address.
module acq_eprom #(
  parameter int unsigned DEPTH = pltv_pkg::FRAME_SAMPLES,
  parameter int unsigned AW    = 16
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [15:0]   data
);
  logic [15:0] rom [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) rom[i] = pltv_pkg::mb_order_addr(i);
  end

  always_ff @(posedge clk) begin
    if (en) data <= rom[addr];
  end
endmodule
