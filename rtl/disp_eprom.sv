// Display address EPROM of the decoder (one per dual-port RAM, fed by the FPGA3
// counter). It maps a pixel's raster index (0..25343 over the 176x144 picture)
// to the address of the sample to show in its RAM: for the luminance table
// (CHROMA=0) the Y sample of that pixel, for the chrominance tables (CHROMA=1)
// the Cr or Cb sample covering the 2x2 pixel group that contains it.
// The RAMs hold blocks in macroblock order, so this table undoes the block
// arrangement. Contents are computed at elaboration from pltv_pkg; the read is
// synchronous (data one cycle after the address).
module disp_eprom #(
  parameter bit          CHROMA = 1'b0,
  parameter int unsigned DEPTH  = pltv_pkg::Y_SAMPLES,
  parameter int unsigned AW     = 15
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [14:0]   data
);
  logic [14:0] rom [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++)
      rom[i] = CHROMA ? 15'(pltv_pkg::c_ram_addr(i)) : pltv_pkg::y_ram_addr(i);
  end

  always_ff @(posedge clk) begin
    if (en) data <= rom[addr];
  end
endmodule
