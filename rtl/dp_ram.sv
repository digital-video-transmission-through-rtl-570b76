// Dual-port RAM of the decoder display path (one each for Y, Cr and Cb).
// Port A is written by the FPGA3 demultiplexer with samples from DSP3; port B is
// read by the output section that feeds the D/A converter. The ports have
// separate clocks, as a true dual-port part would, so the DSP side and the video
// side can run at unrelated rates.
//
// Timing: a write takes effect at the port-A clock edge; the read data appears
// one port-B clock after the address. Depth and width are parameters; the
// defaults hold the QCIF luminance plane (25344 of 32768 words, 8-bit samples).
module dp_ram #(
  parameter int unsigned AW = 15,
  parameter int unsigned DW = 8
) (
  input  logic          clk_a,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [DW-1:0] wdata_a,
  input  logic          clk_b,
  input  logic          en_b,
  input  logic [AW-1:0] addr_b,
  output logic [DW-1:0] rdata_b
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk_a) begin
    if (we_a) mem[addr_a] <= wdata_a;
  end

  always_ff @(posedge clk_b) begin
    if (en_b) rdata_b <= mem[addr_b];
  end
endmodule
